// delay_line: delays a stream by exactly D pixel-enable steps. D = 0 is a wire,
// D = 1 a register, larger delays a read-first circular buffer of D-1 words
// followed by an output register: the read-first BRAM arrangement the document
// describes for its line buffers (the word read at an address is the one written
// there D-1 steps earlier, and it is overwritten in the same cycle). The pointer
// needs no reset: from any start value it wraps within D steps, after which the
// delay is exact.
module delay_line #(
  parameter int unsigned W = 8,
  parameter int unsigned D = 4
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (D == 0) begin : g_wire
    assign dout = din;
  end else if (D == 1) begin : g_reg
    always_ff @(posedge clk) if (en) dout <= din;
  end else begin : g_mem
    localparam int unsigned DEPTH = D - 1;
    localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    logic [W-1:0] mem [DEPTH];
    logic [AW-1:0] ptr;
    always_ff @(posedge clk) begin
      if (en) begin
        dout     <= mem[ptr];
        mem[ptr] <= din;
        ptr      <= (ptr >= AW'(DEPTH - 1)) ? '0 : ptr + AW'(1);
      end
    end
  end
endmodule
