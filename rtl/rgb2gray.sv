// rgb2gray: converts a 24-bit RGB pixel to an 8-bit grey level. The document
// names this unit (it feeds the gradient cores and the guidance inputs of the
// guided filters) but gives no formula; this design uses the ITU-R BT.601 luma
// weights in 8-bit fixed point, gray = (77 R + 150 G + 29 B) >> 8.
// Purely combinational.
module rgb2gray (
  input  logic [23:0] rgb,   // {R, G, B}
  output logic [7:0]  gray
);
  logic [15:0] acc;
  always_comb begin
    acc  = 16'd77 * 16'(rgb[23:16]) + 16'd150 * 16'(rgb[15:8]) + 16'd29 * 16'(rgb[7:0]);
    gray = acc[15:8];
  end
endmodule
