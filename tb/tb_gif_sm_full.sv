// tb_gif_sm_full: one complete frame through the matcher at its default size
// (1280 x 720, 64 disparity levels, r = 3). The scene is random colour texture
// with a background plane at disparity 10 and a rectangle in front at
// disparity 40, rendered into the right view with occlusions. The frame is
// followed by enough samples of a second frame to flush the pipeline. Every
// output pixel of the first frame lying well inside a plane must carry the true
// disparity; the L-R check, both median filters and pipeline stalls must each
// have been exercised.
module tb_gif_sm_full;
  import gifsm_pkg::*;
  localparam int N = 1280, M = 720, DM = 64, R = 3;
  localparam int DB = 10, DF = 40;
  localparam int FX0 = 500, FX1 = 900, FY0 = 200, FY1 = 520;
  localparam int DW = 6;
  localparam int LAT = off_out(N, R, DM, 64, 5, 3);

  logic clk = 0, rst = 1, pix_en = 0;
  logic [23:0] l_rgb, r_rgb;
  logic [DW-1:0] disp, dl_raw;
  logic [15:0] disp_x, disp_y;
  logic ev_invalid, ev_median, ev_spike;
  int checks = 0, failures = 0;
  int n_stall = 0, n_invalid = 0, n_median = 0, n_spike = 0, n_out = 0;

  gif_sm dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_fg(int x, int y);
    return x >= FX0 && x <= FX1 && y >= FY0 && y <= FY1;
  endfunction
  function automatic logic [23:0] tex(int plane, int x, int y);
    // reproducible pseudo-random texture, a hash of the coordinates
    logic [31:0] h = 32'(x) * 32'h9E3779B1 ^ 32'(y) * 32'h85EBCA77 ^ 32'(plane) * 32'hC2B2AE3D;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12;
    return h[23:0];
  endfunction
  function automatic logic [23:0] left_px(int x, int y);
    return in_fg(x, y) ? tex(1, x, y) : tex(0, x, y);
  endfunction
  function automatic logic [23:0] right_px(int x, int y);
    return in_fg(x + DF, y) ? tex(1, x + DF, y) : tex(0, x + DB, y);
  endfunction
  function automatic bit safe(int x, int y);
    int mg = 2 * R + 3;
    if (x < DM + mg || x > N - 1 - 2 * mg - DM || y < mg || y > M - 1 - mg) return 0;
    if (in_fg(x, y)) return (x - mg - DF >= FX0) && (x + mg <= FX1) && (y - mg >= FY0) && (y + mg <= FY1);
    return !(x + mg >= FX0 - DF && x - mg - DF <= FX1 && y + mg >= FY0 && y - mg <= FY1);
  endfunction

  initial begin
    int t, xx, yy, idx, good, nsafe;
    l_rgb = 0; r_rgb = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0; good = 0; nsafe = 0;
    while (t < M * N + LAT + 1) begin
      yy = (t / N) % M; xx = t % N;
      @(negedge clk);
      pix_en = ($urandom_range(0, 63) != 0);
      if (!pix_en) n_stall++;
      l_rgb = left_px(xx, yy);
      r_rgb = right_px(xx, yy);
      @(posedge clk);
      if (pix_en) begin
        #1;
        idx = t + 1 - LAT;
        if (idx >= 0 && idx < M * N) begin
          n_out++;
          n_invalid += int'(ev_invalid);
          n_median  += int'(ev_median);
          n_spike   += int'(ev_spike);
          checks++;
          if (disp_x != 16'(idx % N) || disp_y != 16'(idx / N)) begin
            failures++;
            if (failures < 10) $display("output position (%0d,%0d), expected (%0d,%0d)", disp_x, disp_y, idx % N, idx / N);
          end
          if (safe(disp_x, disp_y)) begin
            nsafe++;
            checks++;
            if (disp == DW'(in_fg(disp_x, disp_y) ? DF : DB)) good++;
            else begin
              failures++;
              if (failures < 10) $display("disparity at (%0d,%0d): %0d", disp_x, disp_y, disp);
            end
          end
        end
        t++;
      end
    end
    $display("frame out: %0d pixels, %0d safe, %0d correct", n_out, nsafe, good);
    $display("events: stalls=%0d lr_invalid=%0d median_changes=%0d spike_changes=%0d",
             n_stall, n_invalid, n_median, n_spike);
    checks += 5;
    if (n_out != M * N) failures++;
    if (n_stall == 0)   failures++;
    if (n_invalid == 0) failures++;
    if (n_median == 0)  failures++;
    if (n_spike == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
