// cvfdsu: Cost Volume Filtering & Disparity Selection Unit. One bank of DM
// guided filters smooths the DM slices of the left-referenced cost volume, guided
// by the grey left image; a second bank smooths the right-referenced slices
// (read diagonally from the cost memory by the CVCU), guided by the grey right
// image. A WTA unit per bank picks the disparity of least filtered cost, giving
// the left and right disparity maps D_L and D_R as raster streams.
// The two banks, the diagonal reading and the tree-based WTA units follow the
// published architecture; the position inputs and clears are this design's own.
// The row/column position of each bank's new-row input comes from the system
// controller (pl_*: left bank, pr_*: right bank, DM-1 columns behind); from it
// the column-sum clear (first row) and leaving-row clear (rows above the image)
// are formed.
// Timing: D_L trails the left cost inputs by R rows plus 2R+10 steps and belongs
// to pixel (x-2R, y-R) of the new-row position; D_R likewise for the right bank.
module cvfdsu
  import gifsm_pkg::*;
#(
  parameter int unsigned N   = 1280,
  parameter int unsigned R   = 3,
  parameter int unsigned DM  = 64,
  parameter int unsigned EPS = 0,
  parameter int unsigned DW  = (DM > 1) ? $clog2(DM) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [15:0]       pl_x,
  input  logic [15:0]       pl_y,
  input  logic [15:0]       pr_x,
  input  logic [15:0]       pr_y,
  input  logic [COST_W-1:0] cl_new [DM],
  input  logic [COST_W-1:0] cl_old [DM],
  input  logic [COST_W-1:0] cr_new [DM],
  input  logic [COST_W-1:0] cr_old [DM],
  input  logic [7:0]        gl_new,
  input  logic [7:0]        gl_old,
  input  logic [7:0]        gl_mid,
  input  logic [7:0]        gr_new,
  input  logic [7:0]        gr_old,
  input  logic [7:0]        gr_mid,
  output logic [DW-1:0]     dl,
  output logic [DW-1:0]     dr
);
  logic signed [Q_W-1:0] ql [DM];
  logic signed [Q_W-1:0] qr [DM];
  logic l_csz, l_opz, r_csz, r_opz;
  assign l_csz = (pl_y == 16'd0);
  assign l_opz = (pl_y < 16'(2 * R + 1));
  assign r_csz = (pr_y == 16'd0);
  assign r_opz = (pr_y < 16'(2 * R + 1));

  for (genvar d = 0; d < DM; d++) begin : g_d
    gif #(.N(N), .R(R), .EPS(EPS)) u_gif_l (
      .clk, .rst, .en, .x(pl_x), .col_sum_zero(l_csz), .old_pixel_zero(l_opz),
      .i_new(gl_new), .i_old(gl_old), .i_mid(gl_mid),
      .p_new(cl_new[d]), .p_old(cl_old[d]), .q(ql[d]));
    gif #(.N(N), .R(R), .EPS(EPS)) u_gif_r (
      .clk, .rst, .en, .x(pr_x), .col_sum_zero(r_csz), .old_pixel_zero(r_opz),
      .i_new(gr_new), .i_old(gr_old), .i_mid(gr_mid),
      .p_new(cr_new[d]), .p_old(cr_old[d]), .q(qr[d]));
  end

  wta #(.D(DM), .DW(DW)) u_wta_l (.clk, .en, .cost(ql), .disp(dl));
  wta #(.D(DM), .DW(DW)) u_wta_r (.clk, .en, .cost(qr), .disp(dr));
endmodule
