// gif_sm: GIF-based stereo matcher, top level. Takes a rectified stereo pair as
// two RGB raster streams (one pixel of each image per enabled clock) and emits
// the refined left disparity map as a raster stream in the same clock.
//   GCMMU  : Sobel gradients, colour/gradient line buffers, target shift registers
//   CVCU   : 2*DM cost units (entering and leaving window rows) and cost memory
//   CVFDSU : 2*DM guided filters (left- and right-referenced volumes), 2 WTA units
//   DRU    : L-R check and filling, segment-based median, spike removal
//   sys_ctrl: stage positions
// Interface: pix_en marks cycles carrying a valid pixel pair; frames are sent
// back to back in raster order, N x M pixels each, starting at pixel (0,0) after
// reset. Holding pix_en low stalls the whole pipeline. disp belongs to image
// position (disp_x, disp_y), which trails the input by gifsm_pkg::off_out
// samples (9117 with the defaults: R+3 rows plus the column latencies of the
// stages). The output stream carries the first frame completely once that many
// samples of the next frame have been sent. The last R rows and the rightmost
// columns of each frame are border pixels computed from windows that wrap.
// Defaults are the document's prototype: 1280 x 720, 64 disparity levels,
// r = 3, eps = 0, Tc = 7, Tg = 2; the unit structure follows the document, the
// stage timing and position bookkeeping are this design's own.
module gif_sm
  import gifsm_pkg::*;
#(
  parameter int unsigned N   = 1280,
  parameter int unsigned M   = 720,
  parameter int unsigned DM  = 64,
  parameter int unsigned R   = 3,
  parameter int unsigned EPS = 0,
  parameter int unsigned TC  = 7,
  parameter int unsigned TG  = 2,
  parameter int unsigned FW  = 64,
  parameter int unsigned M1  = 5,
  parameter int unsigned M2  = 3,
  parameter int unsigned DW  = (DM > 1) ? $clog2(DM) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pix_en,
  input  logic [23:0]   l_rgb,
  input  logic [23:0]   r_rgb,
  output logic [DW-1:0] disp,
  output logic [15:0]   disp_x,
  output logic [15:0]   disp_y,
  output logic [DW-1:0] dl_raw,       // WTA output of the left bank (before refinement)
  output logic          ev_invalid,
  output logic          ev_median,
  output logic          ev_spike
);
  pos_t p_gcc, p_cvl, p_cvr, p_lr, p_fill, p_med, p_spk, p_out;
  sys_ctrl #(.N(N), .M(M), .R(R), .DM(DM), .FW(FW), .M1(M1), .M2(M2)) u_ctrl (
    .clk, .rst, .en(pix_en), .gcc_c(p_gcc), .cvf_l(p_cvl), .cvf_r(p_cvr), .lr(p_lr),
    .fill(p_fill), .med_c(p_med), .spk_c(p_spk), .out(p_out));

  pix_t l_new, l_old;
  pix_t r_new [DM];
  pix_t r_old [DM];
  logic [7:0] gl_new, gl_old, gl_mid, gr_new, gr_old, gr_mid;
  gcmmu #(.N(N), .M(M), .R(R), .DM(DM)) u_gcmmu (
    .clk, .rst, .en(pix_en), .l_rgb, .r_rgb, .cx(p_gcc.x), .cy(p_gcc.y),
    .l_new, .l_old, .r_new, .r_old, .gl_new, .gl_old, .gl_mid, .gr_new, .gr_old, .gr_mid);

  logic [COST_W-1:0] cl_new [DM];
  logic [COST_W-1:0] cl_old [DM];
  logic [COST_W-1:0] cr_new [DM];
  logic [COST_W-1:0] cr_old [DM];
  logic [7:0] hl_new, hl_old, hl_mid, hr_new, hr_old, hr_mid;
  cvcu #(.DM(DM), .TC(TC), .TG(TG)) u_cvcu (
    .clk, .en(pix_en), .l_new, .l_old, .r_new, .r_old,
    .gl_new_i(gl_new), .gl_old_i(gl_old), .gl_mid_i(gl_mid),
    .gr_new_i(gr_new), .gr_old_i(gr_old), .gr_mid_i(gr_mid),
    .cl_new, .cl_old, .cr_new, .cr_old,
    .gl_new(hl_new), .gl_old(hl_old), .gl_mid(hl_mid),
    .gr_new(hr_new), .gr_old(hr_old), .gr_mid(hr_mid));

  logic [DW-1:0] dl, dr;
  cvfdsu #(.N(N), .R(R), .DM(DM), .EPS(EPS), .DW(DW)) u_cvfdsu (
    .clk, .rst, .en(pix_en), .pl_x(p_cvl.x), .pl_y(p_cvl.y), .pr_x(p_cvr.x), .pr_y(p_cvr.y),
    .cl_new, .cl_old, .cr_new, .cr_old,
    .gl_new(hl_new), .gl_old(hl_old), .gl_mid(hl_mid),
    .gr_new(hr_new), .gr_old(hr_old), .gr_mid(hr_mid), .dl, .dr);

  dru #(.N(N), .M(M), .R(R), .DM(DM), .FW(FW), .M1(M1), .M2(M2), .DW(DW)) u_dru (
    .clk, .rst, .en(pix_en), .dl, .dr, .gray_seg(gl_mid),
    .x_lr(p_lr.x), .x_fill(p_fill.x), .mc_x(p_med.x), .mc_y(p_med.y),
    .sc_x(p_spk.x), .sc_y(p_spk.y), .disp, .ev_invalid, .ev_median, .ev_spike);

  assign disp_x = p_out.x;
  assign disp_y = p_out.y;
  assign dl_raw = dl;
endmodule
