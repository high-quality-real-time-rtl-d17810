// gcc: Gradients Computation Core. Converts the incoming RGB stream to grey,
// forms 3x3 grey windows from a two-line scanline buffer and convolves each
// window with the horizontal and vertical Sobel kernels (two CONV units). Each
// result, in -1020..1020, is normalised to 0..255 (NORM units) as (g + 1020) >> 3,
// the scaling being this design's choice (the document only gives the 0..255
// range). Windows centred on the image border give the normalised value of a
// zero gradient (127).
// Timing: the gradients of the pixel presented at raster index t leave the core
// N+3 enabled steps later (window centre N+2 behind the input, plus the output
// register). cx/cy is the position of the window centre, supplied by the system
// controller (offset N+2).
module gcc #(
  parameter int unsigned N = 1280,
  parameter int unsigned M = 720
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [23:0] rgb,
  input  logic [15:0] cx,
  input  logic [15:0] cy,
  output logic [7:0]  gx,
  output logic [7:0]  gy
);
  logic [7:0] gray;
  logic [7:0] win [3][3];

  rgb2gray u_gray (.rgb(rgb), .gray(gray));
  line_window #(.W(8), .N(N), .K(3)) u_win (.clk, .rst, .en, .din(gray), .win);

  function automatic logic [7:0] norm(input logic signed [11:0] g);
    logic signed [12:0] s;
    s = 13'(g) + 13'sd1020;
    return s[10:3];
  endfunction

  logic signed [11:0] cgx, cgy;
  always_comb begin
    // CONV: Sobel X = [-1 0 1; -2 0 2; -1 0 1], Sobel Y = [-1 -2 -1; 0 0 0; 1 2 1]
    cgx = 12'(win[0][2]) + 12'(win[1][2]) * 12'sd2 + 12'(win[2][2])
        - 12'(win[0][0]) - 12'(win[1][0]) * 12'sd2 - 12'(win[2][0]);
    cgy = 12'(win[2][0]) + 12'(win[2][1]) * 12'sd2 + 12'(win[2][2])
        - 12'(win[0][0]) - 12'(win[0][1]) * 12'sd2 - 12'(win[0][2]);
  end

  logic border;
  assign border = (cx == 16'd0) || (cx == 16'(N - 1)) || (cy == 16'd0) || (cy == 16'(M - 1));

  always_ff @(posedge clk) begin
    if (en) begin
      gx <= border ? 8'd127 : norm(cgx);
      gy <= border ? 8'd127 : norm(cgy);
    end
  end
endmodule
