// line_window: K x K sliding window over a raster stream of W-bit samples.
// K-1 line buffers (circular memories of one image row each, indexed by the
// column counter) hold the previous rows; each step the incoming sample and the
// K-1 buffered samples of the same column form a new window column that is
// shifted into a K x K register array. After the enable edge that takes the
// sample at raster index t, win[K-1][K-1] is that sample and win[(K-1)/2][(K-1)/2]
// is the sample (K-1)/2 rows and (K-1)/2 columns back. win[i][j]: row i (0 =
// oldest row), column j (0 = leftmost). Samples outside the image are whatever
// the buffers hold; users treat border centres separately.
// The source architecture only names a scanline buffer feeding the 3x3 Sobel
// window; this generic form is this design's own.
module line_window #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 1280,
  parameter int unsigned K = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] win [K][K]
);
  localparam int unsigned XW = (N > 1) ? $clog2(N) : 1;
  logic [W-1:0]  lb [K-1][N];
  logic [XW-1:0] col;
  logic [W-1:0]  newcol [K];

  always_comb begin
    for (int i = 0; i < K - 1; i++) newcol[i] = lb[i][col];
    newcol[K-1] = din;
  end

  always_ff @(posedge clk) begin
    if (rst) col <= '0;
    else if (en) col <= (col == XW'(N - 1)) ? '0 : col + XW'(1);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < K - 1; i++) lb[i][col] <= newcol[i+1];
      for (int i = 0; i < K; i++) begin
        for (int j = 0; j < K - 1; j++) win[i][j] <= win[i][j+1];
        win[i][K-1] <= newcol[i];
      end
    end
  end
endmodule
