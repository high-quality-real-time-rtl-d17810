// gcmmu: Gradients Computation & Memory Management Unit. Two gradient cores turn
// the left and right RGB streams into x/y gradients; the RGB streams are delayed
// by the cores' latency (N+3 steps) so that colour and gradients of a pixel
// travel together as one pix_t. For each image a (2R+1)-row line buffer
// (read-first memory, delay_line) turns each incoming "new" pixel of row y into
// the "old" pixel of row y-2R-1 at the same column, and a one-step register
// keeps the new pixel in step with the memory output. The right image's new and
// old pixels then pass through DM-stage serial-in parallel-out shift registers,
// so that r_new[d] / r_old[d] is the right pixel d columns left of the current
// left pixel (disparity-level parallelism for the CVCU). The grey guidance of the
// new, old and middle (row y-R) pixels is formed for both images; the right
// guidance is taken DM-1 columns back, where the right-referenced cost volume is
// aligned (see cvcu). Structure per the document; the middle-row grey buffer is
// this design's addition, giving the guided filters the guidance at the output
// pixel.
// Timing: outputs trail the input by N+4 steps (gifsm_pkg::off_gcmmu); right
// guidance by N+4+DM-1. cx/cy: gradient window centre from the system controller.
module gcmmu
  import gifsm_pkg::*;
#(
  parameter int unsigned N  = 1280,
  parameter int unsigned M  = 720,
  parameter int unsigned R  = 3,
  parameter int unsigned DM = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [23:0] l_rgb,
  input  logic [23:0] r_rgb,
  input  logic [15:0] cx,
  input  logic [15:0] cy,
  output pix_t        l_new,
  output pix_t        l_old,
  output pix_t        r_new [DM],
  output pix_t        r_old [DM],
  output logic [7:0]  gl_new,
  output logic [7:0]  gl_old,
  output logic [7:0]  gl_mid,
  output logic [7:0]  gr_new,
  output logic [7:0]  gr_old,
  output logic [7:0]  gr_mid
);
  localparam int unsigned LG = N + 3;

  logic [7:0]  lgx, lgy, rgx, rgy;
  logic [23:0] l_rgb_d, r_rgb_d;
  gcc #(.N(N), .M(M)) u_gcc_l (.clk, .rst, .en, .rgb(l_rgb), .cx, .cy, .gx(lgx), .gy(lgy));
  gcc #(.N(N), .M(M)) u_gcc_r (.clk, .rst, .en, .rgb(r_rgb), .cx, .cy, .gx(rgx), .gy(rgy));
  delay_line #(.W(24), .D(LG)) u_dl_l (.clk, .en, .din(l_rgb), .dout(l_rgb_d));
  delay_line #(.W(24), .D(LG)) u_dl_r (.clk, .en, .din(r_rgb), .dout(r_rgb_d));

  pix_t lp, rp, r_new0, r_old0;
  assign lp = '{r: l_rgb_d[23:16], g: l_rgb_d[15:8], b: l_rgb_d[7:0], gx: lgx, gy: lgy};
  assign rp = '{r: r_rgb_d[23:16], g: r_rgb_d[15:8], b: r_rgb_d[7:0], gx: rgx, gy: rgy};

  // (2R+1)-line buffers: new pixel register and read-first memory output.
  delay_line #(.W($bits(pix_t)), .D(1)) u_lnew (.clk, .en, .din(lp), .dout(l_new));
  delay_line #(.W($bits(pix_t)), .D((2*R+1)*N + 1)) u_lold (.clk, .en, .din(lp), .dout(l_old));
  delay_line #(.W($bits(pix_t)), .D(1)) u_rnew (.clk, .en, .din(rp), .dout(r_new0));
  delay_line #(.W($bits(pix_t)), .D((2*R+1)*N + 1)) u_rold (.clk, .en, .din(rp), .dout(r_old0));

  // Target-image shift registers.
  if (DM == 1) begin : g_nosr
    always_comb begin
      r_new[0] = r_new0;
      r_old[0] = r_old0;
    end
  end else begin : g_sr
    pix_t sr_new [1:DM-1];
    pix_t sr_old [1:DM-1];
    always_ff @(posedge clk) begin
      if (en) begin
        sr_new[1] <= r_new0;
        sr_old[1] <= r_old0;
        for (int d = 2; d < DM; d++) begin
          sr_new[d] <= sr_new[d-1];
          sr_old[d] <= sr_old[d-1];
        end
      end
    end
    always_comb begin
      r_new[0] = r_new0;
      r_old[0] = r_old0;
      for (int d = 1; d < DM; d++) begin
        r_new[d] = sr_new[d];
        r_old[d] = sr_old[d];
      end
    end
  end

  // Grey guidance.
  rgb2gray u_g_ln (.rgb({l_new.r, l_new.g, l_new.b}), .gray(gl_new));
  rgb2gray u_g_lo (.rgb({l_old.r, l_old.g, l_old.b}), .gray(gl_old));
  rgb2gray u_g_rn (.rgb({r_new[DM-1].r, r_new[DM-1].g, r_new[DM-1].b}), .gray(gr_new));
  rgb2gray u_g_ro (.rgb({r_old[DM-1].r, r_old[DM-1].g, r_old[DM-1].b}), .gray(gr_old));

  // Middle-row grey buffers (row y-R).
  logic [7:0] gl_p, gr_p;
  rgb2gray u_g_lp (.rgb(l_rgb_d), .gray(gl_p));
  rgb2gray u_g_rp (.rgb(r_rgb_d), .gray(gr_p));
  delay_line #(.W(8), .D(R * N + 1))          u_lmid (.clk, .en, .din(gl_p), .dout(gl_mid));
  delay_line #(.W(8), .D(R * N + 1 + DM - 1)) u_rmid (.clk, .en, .din(gr_p), .dout(gr_mid));
endmodule
