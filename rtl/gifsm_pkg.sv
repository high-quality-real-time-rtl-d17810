// gifsm_pkg: types, fixed-point formats and pipeline offsets shared by the
// guided-image-filter stereo matcher.
//
// Every unit of the matcher is a raster-order stream pipeline that advances
// only on cycles where the pixel enable is high. A signal's "offset" is how many
// raster positions it trails the pixel currently presented at the matcher input;
// a register stage adds one, a window adds the distance from its newest sample
// to its centre. The functions below give the offset of every stage boundary so
// that the system controller can generate the position (x, y) each unit works on.
// The offsets are this design's own pipeline; the document only states that all
// units are pipelined and synchronised with the pixel clock.
package gifsm_pkg;

  // Colour and gradient sample of one pixel, as buffered by the GCMMU.
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
    logic [7:0] gx;   // normalised Sobel x-gradient, 0..255
    logic [7:0] gy;   // normalised Sobel y-gradient, 0..255
  } pix_t;

  // Raster position of a stream sample.
  typedef struct packed {
    logic [15:0] x;
    logic [15:0] y;
  } pos_t;

  // Fixed-point formats of the guided filter.
  localparam int unsigned MEAN_FRAC = 4;   // fractional bits of the box means
  localparam int unsigned A_FRAC    = 8;   // fractional bits of coefficient a
  localparam int unsigned A_W       = 32;  // width of a (signed)
  localparam int unsigned B_W       = 48;  // width of b (signed, A_FRAC+MEAN_FRAC fraction bits)
  localparam int unsigned Q_W       = 48;  // width of the filtered cost q (signed, same fraction as b)
  localparam int unsigned COST_W    = 8;   // width of one matching cost

  // Gradient core: 3x3 window centre trails its input by N+2, output register adds 1.
  function automatic int unsigned off_gcc_centre(int unsigned n);
    return n + 2;
  endfunction
  function automatic int unsigned off_gcmmu(int unsigned n);   // new-pixel outputs of the GCMMU
    return n + 4;
  endfunction
  function automatic int unsigned off_cvf(int unsigned n);     // costs entering the left GIFs
    return n + 5;
  endfunction
  // Latency of the guided filter from its new-row input to q (columns), see gif.sv.
  function automatic int unsigned gif_lat(int unsigned r);
    return 2 * r + 9;
  endfunction
  // Left disparity at the CVFDSU output (GIF rows r, GIF latency, WTA register).
  function automatic int unsigned off_dl(int unsigned n, int unsigned r);
    return off_cvf(n) + r * n + gif_lat(r) + 1;
  endfunction
  // L-R check stage (left disparity delayed until the right map has caught up).
  function automatic int unsigned off_lr(int unsigned n, int unsigned r, int unsigned dm);
    return off_dl(n, r) + dm - 1;
  endfunction
  // Pixel under test in the filling stage.
  function automatic int unsigned off_fill(int unsigned n, int unsigned r, int unsigned dm,
                                           int unsigned fw);
    return off_lr(n, r, dm) + 1 + fw;
  endfunction
  // Filled disparity (filling output register).
  function automatic int unsigned off_filled(int unsigned n, int unsigned r, int unsigned dm,
                                             int unsigned fw);
    return off_fill(n, r, dm, fw) + 1;
  endfunction
  // Centre of an m x m window built from a stream of offset o, and the median output.
  function automatic int unsigned off_win_centre(int unsigned o, int unsigned n, int unsigned m);
    return o + 1 + ((m - 1) / 2) * n + (m - 1) / 2;
  endfunction
  function automatic int unsigned off_med_out(int unsigned o, int unsigned n, int unsigned m);
    return off_win_centre(o, n, m) + 1;
  endfunction
  function automatic int unsigned off_out(int unsigned n, int unsigned r, int unsigned dm,
                                          int unsigned fw, int unsigned m1, int unsigned m2);
    return off_med_out(off_med_out(off_filled(n, r, dm, fw), n, m1), n, m2);
  endfunction

endpackage
