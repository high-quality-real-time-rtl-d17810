// dru: Disparity Refinement Unit. The left map D_L is delayed by DM-1 steps
// (Buff D_L) so that the right map D_R has caught up, then the L-R check and
// filling unit replaces inconsistent disparities. The filled map passes an
// m1 x m1 segment-based (adaptive) median filter, whose segment labels come from
// thresholding the grey left image; the labels are delayed (Buff Seg_L) to line
// up with the disparities and buffered with them in the same line buffers.
// Finally an m2 x m2 plain median filter removes spikes. Window centres within
// (m-1)/2 of the image border are passed through unfiltered (this design's
// choice). The order of the stages follows the document; the window sizes m1 = 5
// and m2 = 3 are this design's choice.
// Timing: positions of the stages come from the system controller (x_lr: the
// check, x_fill: the pixel under test, mc_*: adaptive-median window centre,
// sc_*: spike-removal window centre). gray_seg is the grey left image at row y-R
// of the GCMMU new row, which trails the filled disparity by 2R+DM+FW+12 steps.
module dru #(
  parameter int unsigned N  = 1280,
  parameter int unsigned M  = 720,
  parameter int unsigned R  = 3,
  parameter int unsigned DM = 64,
  parameter int unsigned FW = 64,
  parameter int unsigned M1 = 5,
  parameter int unsigned M2 = 3,
  parameter int unsigned SL = 8,
  parameter int unsigned DW = (DM > 1) ? $clog2(DM) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [DW-1:0] dl,
  input  logic [DW-1:0] dr,
  input  logic [7:0]    gray_seg,
  input  logic [15:0]   x_lr,
  input  logic [15:0]   x_fill,
  input  logic [15:0]   mc_x,
  input  logic [15:0]   mc_y,
  input  logic [15:0]   sc_x,
  input  logic [15:0]   sc_y,
  output logic [DW-1:0] disp,
  output logic          ev_invalid,    // pixel leaving the filling stage was filled
  output logic          ev_median,     // adaptive median changed its centre value
  output logic          ev_spike       // spike removal changed its centre value
);
  localparam int unsigned SW = (SL > 1) ? $clog2(SL) : 1;
  localparam int unsigned SEG_DELAY = 2 * R + DM + FW + 12;
  localparam int unsigned H1 = (M1 - 1) / 2;
  localparam int unsigned H2 = (M2 - 1) / 2;

  // Buff D_L
  logic [DW-1:0] dl_d;
  delay_line #(.W(DW), .D(DM - 1)) u_buf_dl (.clk, .en, .din(dl), .dout(dl_d));

  logic [DW-1:0] filled;
  lr_check_fill #(.N(N), .DM(DM), .FW(FW), .DW(DW)) u_lrc (
    .clk, .rst, .en, .dl(dl_d), .dr, .x_lr, .x_fill, .disp(filled), .invalid(ev_invalid));

  // Segmentation and Buff Seg_L
  logic [SW-1:0] lab, lab_d;
  segmentation #(.L(SL), .SW(SW)) u_seg (.gray(gray_seg), .label(lab));
  delay_line #(.W(SW), .D(SEG_DELAY)) u_buf_seg (.clk, .en, .din(lab), .dout(lab_d));

  // Adaptive median
  logic [SW+DW-1:0] w1 [M1][M1];
  logic [DW-1:0]    w1_d [M1][M1];
  logic [SW-1:0]    w1_l [M1][M1];
  line_window #(.W(SW + DW), .N(N), .K(M1)) u_win1 (.clk, .rst, .en, .din({lab_d, filled}), .win(w1));
  always_comb begin
    for (int i = 0; i < M1; i++)
      for (int j = 0; j < M1; j++) begin
        w1_d[i][j] = w1[i][j][DW-1:0];
        w1_l[i][j] = w1[i][j][SW+DW-1:DW];
      end
  end
  logic byp1, byp2;
  assign byp1 = (mc_x < 16'(H1)) || (mc_x > 16'(N - 1 - H1)) || (mc_y < 16'(H1)) || (mc_y > 16'(M - 1 - H1));
  assign byp2 = (sc_x < 16'(H2)) || (sc_x > 16'(N - 1 - H2)) || (sc_y < 16'(H2)) || (sc_y > 16'(M - 1 - H2));

  logic [DW-1:0] med1;
  median_filter #(.MW(M1), .DW(DW), .SW(SW), .ADAPTIVE(1'b1)) u_amf (
    .clk, .en, .bypass(byp1), .disp(w1_d), .label(w1_l), .median(med1), .changed(ev_median));

  // Spike removal
  logic [DW-1:0] w2 [M2][M2];
  logic [0:0]    w2_l [M2][M2];
  always_comb for (int i = 0; i < M2; i++) for (int j = 0; j < M2; j++) w2_l[i][j] = 1'b0;
  line_window #(.W(DW), .N(N), .K(M2)) u_win2 (.clk, .rst, .en, .din(med1), .win(w2));
  median_filter #(.MW(M2), .DW(DW), .SW(1), .ADAPTIVE(1'b0)) u_spk (
    .clk, .en, .bypass(byp2), .disp(w2), .label(w2_l), .median(disp), .changed(ev_spike));
endmodule
