// tb_gif_sm: end-to-end test of the stereo matcher on a synthetic scene. The
// left image is random colour texture; a rectangle in front has disparity DF,
// the background disparity DB. The right image is rendered from the same
// textures, so the background next to the rectangle is occluded in one view,
// which makes the L-R check reject pixels and the filling replace them. Frames
// are streamed back to back with random pixel-enable gaps (stalls). Checks:
//  - the refined output equals the true disparity on every pixel well inside a
//    plane (away from depth edges and image borders), from the third frame on,
//  - the output position counter walks the frame in raster order,
//  - every mechanism happened: stall, L-R rejection/filling, adaptive-median
//    change, spike-removal change (each counts a failure if never seen).
module tb_gif_sm;
  localparam int N = 96, M = 40, DM = 16, R = 3, FW = 16;
  localparam int DB = 3, DF = 9;
  localparam int FX0 = 40, FX1 = 72, FY0 = 10, FY1 = 29;   // rectangle in left-image coordinates
  localparam int FRAMES = 3;
  localparam int DW = $clog2(DM);

  logic clk = 0, rst = 1, pix_en = 0;
  logic [23:0] l_rgb, r_rgb;
  logic [DW-1:0] disp, dl_raw;
  logic [15:0] disp_x, disp_y;
  logic ev_invalid, ev_median, ev_spike;
  int checks = 0, failures = 0;
  int n_stall = 0, n_invalid = 0, n_median = 0, n_spike = 0;
  int out_ok = 0, out_n = 0;

  gif_sm #(.N(N), .M(M), .DM(DM), .R(R), .FW(FW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] tex_bg [M][N+DM+1];
  logic [23:0] tex_fg [M][N+DM+1];
  logic [23:0] limg [M][N];
  logic [23:0] rimg [M][N];
  int truth [M][N];

  function automatic bit in_fg(int x, int y);
    return x >= FX0 && x <= FX1 && y >= FY0 && y <= FY1;
  endfunction

  // true only well inside a plane: no depth edge within the filter and window reach
  function automatic bit safe(int x, int y);
    int mg = 2 * R + 3;
    if (x < DM + mg || x > N - 1 - mg || y < mg || y > M - 1 - mg) return 0;
    for (int yy = y - mg; yy <= y + mg; yy++)
      for (int xx = x - mg - DF; xx <= x + mg; xx++)
        if (in_fg(xx, yy) != in_fg(x, y)) return 0;
    return 1;
  endfunction

  initial begin
    int t, xx, yy, last_x, last_y;
    bit first_out;
    for (int y = 0; y < M; y++)
      for (int x = 0; x <= N + DM; x++) begin
        tex_bg[y][x] = 24'($urandom);
        tex_fg[y][x] = 24'($urandom);
      end
    for (int y = 0; y < M; y++)
      for (int x = 0; x < N; x++) begin
        limg[y][x]  = in_fg(x, y) ? tex_fg[y][x] : tex_bg[y][x];
        truth[y][x] = in_fg(x, y) ? DF : DB;
        // right view: pixel x sees left-image point x+d of the nearest surface
        rimg[y][x]  = in_fg(x + DF, y) ? tex_fg[y][x + DF] : tex_bg[y][x + DB];
      end
    l_rgb = 0; r_rgb = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0; first_out = 1; last_x = 0; last_y = 0;
    while (t < FRAMES * M * N) begin
      yy = (t / N) % M; xx = t % N;
      @(negedge clk);
      pix_en = ($urandom_range(0, 7) != 0);
      if (!pix_en) n_stall++;
      l_rgb = limg[yy][xx];
      r_rgb = rimg[yy][xx];
      @(posedge clk);
      if (pix_en) begin
        #1;
        n_invalid += int'(ev_invalid);
        n_median  += int'(ev_median);
        n_spike   += int'(ev_spike);
        // raster order of the output positions
        if (!first_out) begin
          checks++;
          if (!((disp_x == 16'(last_x + 1) && disp_y == 16'(last_y)) ||
                (disp_x == 0 && last_x == N - 1 && disp_y == 16'((last_y + 1) % M)))) begin
            failures++;
            $display("output position jumped from (%0d,%0d) to (%0d,%0d)", last_x, last_y, disp_x, disp_y);
          end
        end
        first_out = 0; last_x = disp_x; last_y = disp_y;
        // from the second frame on the output belongs to a complete frame
        if (t >= 2 * M * N && safe(disp_x, disp_y)) begin
          out_n++;
          checks++;
          if (disp == DW'(truth[disp_y][disp_x])) out_ok++;
          else begin
            failures++;
            if (failures < 10) $display("disparity at (%0d,%0d): got %0d, true %0d", disp_x, disp_y, disp, truth[disp_y][disp_x]);
          end
        end
        t++;
      end
    end
    $display("refined output: %0d of %0d safe pixels correct", out_ok, out_n);
    $display("events: stalls=%0d lr_invalid=%0d median_changes=%0d spike_changes=%0d",
             n_stall, n_invalid, n_median, n_spike);
    checks++; if (out_n < 100) failures++;
    checks++; if (n_stall == 0)   begin failures++; $display("no stall"); end
    checks++; if (n_invalid == 0) begin failures++; $display("no L-R rejection"); end
    checks++; if (n_median == 0)  begin failures++; $display("no adaptive-median change"); end
    checks++; if (n_spike == 0)   begin failures++; $display("no spike removal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
