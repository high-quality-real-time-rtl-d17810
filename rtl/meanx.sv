// meanx: horizontal mean over 2R+1 consecutive samples of a signed stream, an
// accumulator plus a (2R+1)-deep FIFO: each step the new sample is added and the
// one leaving the window subtracted. Used by the guided filter for the means of
// a and b, which the document computes along x only. The accumulator and FIFO
// are cleared at the first column of a row (`first`), so windows are zero-padded
// at the left edge (this design's choice). The sum is scaled by 1/(2R+1) as a
// fixed-point multiply with a 16-bit reciprocal; the shift is arithmetic.
// Timing: after the edge that takes sample t, `mean` holds the mean of the
// window whose newest sample was taken one step earlier (two register stages).
module meanx #(
  parameter int unsigned W = 32,
  parameter int unsigned R = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                first,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] mean
);
  localparam int unsigned K  = 2 * R + 1;
  localparam int unsigned SH = 16;
  localparam longint RECIP = ((64'sd1 <<< SH) + K / 2) / K;

  logic signed [W-1:0] fifo [K];
  logic signed [63:0]  acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      for (int i = 0; i < K; i++) fifo[i] <= '0;
    end else if (en) begin
      fifo[0] <= din;
      if (first) begin
        acc <= 64'(din);
        for (int i = 1; i < K; i++) fifo[i] <= '0;
      end else begin
        acc <= acc + 64'(din) - 64'(fifo[K-1]);
        for (int i = 1; i < K; i++) fifo[i] <= fifo[i-1];
      end
    end
  end

  logic signed [63:0] prod;
  always_comb prod = (acc * RECIP) >>> SH;
  always_ff @(posedge clk) if (en) mean <= W'(prod);
endmodule
