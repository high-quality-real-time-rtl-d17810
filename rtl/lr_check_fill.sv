// lr_check_fill: left/right consistency check and filling of the left disparity
// map. D_R arrives as a stream and a DM-entry shift register keeps its last DM
// values, so D_R at x-D_L(x) is selected by D_L(x) itself (D_L is presented
// DM-1 steps late so that this window holds the needed values). D_L(x) is
// consistent when x-D_L(x) lies in the image and |D_L(x) - D_R(x-D_L(x))| <= 1.
// Filling: a pixel that fails the check takes the smaller of its nearest
// consistent neighbours to the left and to the right in the same row. The left
// one is held in a register updated as pixels pass; the right one is found by a
// priority encoder over a look-ahead shift register of FW pixels. If only one
// side has a consistent pixel it is used; if neither, 0. Check and fill rule
// follow the document; the look-ahead length FW is this design's choice.
// Timing: x_lr is the column of dl/dr; x_fill the column of the pixel under
// test, FW+1 steps later. The output register trails dl by FW+2 steps.
module lr_check_fill #(
  parameter int unsigned N  = 1280,
  parameter int unsigned DM = 64,
  parameter int unsigned FW = 64,
  parameter int unsigned DW = (DM > 1) ? $clog2(DM) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [DW-1:0] dl,
  input  logic [DW-1:0] dr,
  input  logic [15:0]   x_lr,
  input  logic [15:0]   x_fill,
  output logic [DW-1:0] disp,
  output logic          invalid      // the output pixel failed the check and was filled
);
  typedef struct packed {
    logic          ok;
    logic [DW-1:0] d;
  } cand_t;

  // Buffer of the right disparity map.
  logic [DW-1:0] drs [DM];
  if (DM == 1) begin : g_nodrs
    always_comb drs[0] = dr;
  end else begin : g_drs
    logic [DW-1:0] drq [1:DM-1];
    always_ff @(posedge clk) begin
      if (en) begin
        drq[1] <= dr;
        for (int k = 2; k < DM; k++) drq[k] <= drq[k-1];
      end
    end
    always_comb begin
      drs[0] = dr;
      for (int k = 1; k < DM; k++) drs[k] = drq[k];
    end
  end

  // Consistency check.
  logic [DW-1:0] dr_m;
  logic          ok_c;
  always_comb begin
    dr_m = drs[dl];
    ok_c = (x_lr >= 16'(dl)) && (((dl >= dr_m) ? (dl - dr_m) : (dr_m - dl)) <= DW'(1));
  end

  // Look-ahead: la[0] newest, la[FW] is the pixel under test.
  cand_t la [FW+1];
  always_ff @(posedge clk) begin
    if (en) begin
      la[0] <= '{ok: ok_c, d: dl};
      for (int j = 1; j <= FW; j++) la[j] <= la[j-1];
    end
  end

  logic          has_l, has_r;
  logic [DW-1:0] left_d, right_d, fill_d;
  logic          has_l_q;
  logic [DW-1:0] left_q;
  always_comb begin
    has_l  = (x_fill != 16'd0) && has_l_q;
    left_d = left_q;
    has_r  = 1'b0;
    right_d = '0;
    for (int j = 0; j < FW; j++) begin   // nearest wins: highest j last
      if (la[j].ok && (32'(x_fill) + FW - j <= N - 1)) begin
        has_r   = 1'b1;
        right_d = la[j].d;
      end
    end
    if (has_l && has_r) fill_d = (left_d < right_d) ? left_d : right_d;
    else if (has_l)     fill_d = left_d;
    else if (has_r)     fill_d = right_d;
    else                fill_d = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      has_l_q <= 1'b0;
      left_q  <= '0;
      disp    <= '0;
      invalid <= 1'b0;
    end else if (en) begin
      disp    <= la[FW].ok ? la[FW].d : fill_d;
      invalid <= !la[FW].ok;
      if (la[FW].ok) begin
        has_l_q <= 1'b1;
        left_q  <= la[FW].d;
      end else if (x_fill == 16'd0) begin
        has_l_q <= 1'b0;
      end
    end
  end
endmodule
