// mean_filter: (2R+1) x (2R+1) box mean over a raster stream whose logic does
// not grow with R. The caller supplies, per column x, the sample entering the
// window (new_pix, row y) and the sample leaving it (old_pix, row y-2R-1).
// Column sums of 2R+1 rows live in a column-sum memory of N words: the sum of
// column x is read one step early, updated by +new -old and written back to the
// same address. The window sum adds the updated column sum and subtracts the one
// from 2R+1 columns earlier, which comes from a 2R+1-deep queue instead of a
// second memory read. The mean is the window sum times 1/(2R+1)^2 in fixed
// point, with OUT_FRAC fractional bits kept. This follows the document's mean
// filter; the queue and window-sum clearing at the first column of a row
// (windows are zero-padded at the left edge) is this design's choice.
// col_sum_zero forces the column sum read to zero (first row of a frame),
// old_pixel_zero forces the leaving sample to zero (rows above the image).
// Timing: the mean whose window has its newest column at the sample presented at
// step t is on `mean` three enabled steps later; its window is centred R columns
// and R rows before that sample.
module mean_filter #(
  parameter int unsigned IN_W     = 8,
  parameter int unsigned N        = 1280,
  parameter int unsigned R        = 3,
  parameter int unsigned OUT_FRAC = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [15:0]              x,              // column of the new sample
  input  logic                     col_sum_zero,
  input  logic                     old_pixel_zero,
  input  logic [IN_W-1:0]          new_pix,
  input  logic [IN_W-1:0]          old_pix,
  output logic [IN_W+OUT_FRAC-1:0] mean
);
  localparam int unsigned K   = 2 * R + 1;
  localparam int unsigned CSW = IN_W + $clog2(K + 1);
  localparam int unsigned WSW = CSW + $clog2(K + 1);
  localparam int unsigned SH  = 18;
  localparam longint unsigned RECIP = ((64'd1 << SH) + (K * K) / 2) / (K * K);
  localparam int unsigned XW  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned OW  = IN_W + OUT_FRAC;

  logic [CSW-1:0]  colmem [N];
  logic [CSW-1:0]  rd_q;
  logic [XW-1:0]   x_q;
  logic            first_q;
  logic [IN_W-1:0] new_q, old_q;
  logic            csz_q, opz_q;

  // Stage 1: read the column sum one step before it is updated.
  always_ff @(posedge clk) begin
    if (en) begin
      rd_q    <= colmem[XW'(x)];
      x_q     <= XW'(x);
      first_q <= (x == 16'd0);
      new_q   <= new_pix;
      old_q   <= old_pix;
      csz_q   <= col_sum_zero;
      opz_q   <= old_pixel_zero;
    end
  end

  // Stage 2: column-sum update and window-sum update.
  logic [CSW-1:0] cs_upd;
  logic [CSW-1:0] queue [K];
  logic [WSW-1:0] wsum;
  always_comb begin
    cs_upd = (csz_q ? CSW'(0) : rd_q) + CSW'(new_q) - (opz_q ? CSW'(0) : CSW'(old_q));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wsum <= '0;
      for (int i = 0; i < K; i++) queue[i] <= '0;
    end else if (en) begin
      colmem[x_q] <= cs_upd;
      if (first_q) begin
        wsum     <= WSW'(cs_upd);
        queue[0] <= cs_upd;
        for (int i = 1; i < K; i++) queue[i] <= '0;
      end else begin
        wsum     <= wsum + WSW'(cs_upd) - WSW'(queue[K-1]);
        queue[0] <= cs_upd;
        for (int i = 1; i < K; i++) queue[i] <= queue[i-1];
      end
    end
  end

  // Stage 3: multiply by 1/(2R+1)^2.
  logic [63:0] prod;
  always_comb prod = (64'(wsum) * RECIP) >> (SH - OUT_FRAC);
  always_ff @(posedge clk) begin
    if (en) mean <= (prod > 64'((64'd1 << OW) - 1)) ? {OW{1'b1}} : OW'(prod);
  end
endmodule
