// raster_pos: raster position of a stream that trails the matcher input by a
// fixed number of samples (OFFSET). It is a column/row counter that advances on
// every pixel-enable cycle and wraps at the end of each M x N frame; at reset it
// starts OFFSET positions before pixel (0,0), so that it reports the position of
// the sample a delayed pipeline stage is handling. Output is registered state,
// valid in the same cycle as the stage's data. This counter is the design's own
// way of realising the document's system controller.
module raster_pos #(
  parameter int unsigned N      = 1280,  // image width
  parameter int unsigned M      = 720,   // image height
  parameter int unsigned OFFSET = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [15:0] x,
  output logic [15:0] y
);
  localparam int unsigned TOTAL = N * M;
  localparam int unsigned START = (TOTAL - (OFFSET % TOTAL)) % TOTAL;

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= 16'(START % N);
      y <= 16'(START / N);
    end else if (en) begin
      if (x == 16'(N - 1)) begin
        x <= '0;
        y <= (y == 16'(M - 1)) ? '0 : y + 16'd1;
      end else begin
        x <= x + 16'd1;
      end
    end
  end
endmodule
