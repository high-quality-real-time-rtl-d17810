// sys_ctrl: system controller. The matcher has no stalls or handshakes of its own:
// every unit advances on the shared pixel enable, so control reduces to knowing
// which image position each unit is working on. The controller keeps one
// raster position counter per unit boundary, each started at reset the stage's
// pipeline offset (gifsm_pkg) before pixel (0,0) and advanced by the pixel
// enable, and hands out: the gradient-window centre, the new-row position of the
// left and right guided-filter banks, the L-R check and filling positions, the
// two median-window centres and the position of the output pixel. The document
// names the controller only; its form is this design's choice.
module sys_ctrl
  import gifsm_pkg::*;
#(
  parameter int unsigned N  = 1280,
  parameter int unsigned M  = 720,
  parameter int unsigned R  = 3,
  parameter int unsigned DM = 64,
  parameter int unsigned FW = 64,
  parameter int unsigned M1 = 5,
  parameter int unsigned M2 = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output pos_t gcc_c,     // gradient window centre
  output pos_t cvf_l,     // new row entering the left GIF bank
  output pos_t cvf_r,     // new row entering the right GIF bank
  output pos_t lr,        // L-R check
  output pos_t fill,      // pixel under test in the filling stage
  output pos_t med_c,     // adaptive median window centre
  output pos_t spk_c,     // spike removal window centre
  output pos_t out        // output pixel
);
  localparam int unsigned O_FILLED = off_filled(N, R, DM, FW);
  localparam int unsigned O_MED    = off_med_out(O_FILLED, N, M1);

  raster_pos #(.N(N), .M(M), .OFFSET(off_gcc_centre(N)))          u_p0 (.clk, .rst, .en, .x(gcc_c.x), .y(gcc_c.y));
  raster_pos #(.N(N), .M(M), .OFFSET(off_cvf(N)))                 u_p1 (.clk, .rst, .en, .x(cvf_l.x), .y(cvf_l.y));
  raster_pos #(.N(N), .M(M), .OFFSET(off_cvf(N) + DM - 1))        u_p2 (.clk, .rst, .en, .x(cvf_r.x), .y(cvf_r.y));
  raster_pos #(.N(N), .M(M), .OFFSET(off_lr(N, R, DM)))           u_p3 (.clk, .rst, .en, .x(lr.x), .y(lr.y));
  raster_pos #(.N(N), .M(M), .OFFSET(off_fill(N, R, DM, FW)))     u_p4 (.clk, .rst, .en, .x(fill.x), .y(fill.y));
  raster_pos #(.N(N), .M(M), .OFFSET(off_win_centre(O_FILLED, N, M1))) u_p5 (.clk, .rst, .en, .x(med_c.x), .y(med_c.y));
  raster_pos #(.N(N), .M(M), .OFFSET(off_win_centre(O_MED, N, M2)))    u_p6 (.clk, .rst, .en, .x(spk_c.x), .y(spk_c.y));
  raster_pos #(.N(N), .M(M), .OFFSET(off_out(N, R, DM, FW, M1, M2)))  u_p7 (.clk, .rst, .en, .x(out.x), .y(out.y));
endmodule
