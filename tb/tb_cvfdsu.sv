// tb_cvfdsu: feeds both GIF banks (N = 16, M = 12, R = 1, DM = 4) with cost
// volumes whose slice d is low where d equals a known disparity map and higher
// by 40 per level elsewhere, plus noise, under random grey guidance and enable
// gaps. The left map has two vertical halves (disparities 1 and 3), the right
// map two horizontal halves (0 and 2), the right bank running DM-1 columns
// behind as in the matcher. Every output pixel whose filter windows stay inside
// one half and inside the frame must carry that half's disparity, at the GIF
// latency plus the WTA register.
module tb_cvfdsu;
  import gifsm_pkg::*;
  localparam int N = 16, M = 12, R = 1, DM = 4, FR = 3;
  localparam int LAT = 2 * R + 10;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] pl_x, pl_y, pr_x, pr_y;
  logic [COST_W-1:0] cl_new [DM];
  logic [COST_W-1:0] cl_old [DM];
  logic [COST_W-1:0] cr_new [DM];
  logic [COST_W-1:0] cr_old [DM];
  logic [7:0] gl_new, gl_old, gl_mid, gr_new, gr_old, gr_mid;
  logic [1:0] dl, dr;
  int checks = 0, failures = 0;
  int cl [FR][M][N][DM];
  int cr [FR][M][N][DM];
  int gl [FR][M][N];
  int grr [FR][M][N];

  cvfdsu #(.N(N), .R(R), .DM(DM)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tl(int x, int y); return (x < N / 2) ? 1 : 3; endfunction
  function automatic int tr(int x, int y); return (y < M / 2) ? 0 : 2; endfunction
  function automatic bit safe_l(int x, int y);
    if (x - 2 * R < 0 || x + 2 * R > N - 1 || y - R < 0 || y + R > M - 1) return 0;
    return tl(x - 2 * R, y) == tl(x + 2 * R, y);
  endfunction
  function automatic bit safe_r(int x, int y);
    if (x - 2 * R < 0 || x + 2 * R > N - 1 || y - R < 0 || y + R > M - 1) return 0;
    return tr(x, y - R) == tr(x, y + R);
  endfunction
  function automatic int at(int i, output int f, output int y, output int x);
    f = i / (M * N); y = (i / N) % M; x = i % N;
    return i;
  endfunction

  initial begin
    int t, f, y, x, i, fo, yo, xo, tv;
    for (int a = 0; a < FR; a++) for (int b = 0; b < M; b++) for (int c = 0; c < N; c++) begin
      gl[a][b][c] = $urandom_range(0, 255);
      grr[a][b][c] = $urandom_range(0, 255);
      for (int d = 0; d < DM; d++) begin
        cl[a][b][c][d] = 40 * ((d > tl(c, b)) ? d - tl(c, b) : tl(c, b) - d) + $urandom_range(0, 3);
        cr[a][b][c][d] = 40 * ((d > tr(c, b)) ? d - tr(c, b) : tr(c, b) - d) + $urandom_range(0, 3);
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0;
    while (t < FR * M * N) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      // left bank: new row at index t
      void'(at(t, f, y, x));
      pl_x = 16'(x); pl_y = 16'(y);
      gl_new = 8'(gl[f][y][x]);
      gl_mid = (y >= R) ? 8'(gl[f][y - R][x]) : 8'($urandom);
      gl_old = (y >= 2 * R + 1) ? 8'(gl[f][y - 2 * R - 1][x]) : 8'($urandom);
      for (int d = 0; d < DM; d++) begin
        cl_new[d] = COST_W'(cl[f][y][x][d]);
        cl_old[d] = (y >= 2 * R + 1) ? COST_W'(cl[f][y - 2 * R - 1][x][d]) : COST_W'($urandom);
      end
      // right bank: DM-1 samples behind
      tv = t - (DM - 1);
      if (tv < 0) tv += M * N;
      void'(at(tv, f, y, x));
      if (t < DM - 1) f = 0;
      pr_x = 16'(x); pr_y = 16'(y);
      gr_new = 8'(grr[f][y][x]);
      gr_mid = (y >= R) ? 8'(grr[f][y - R][x]) : 8'($urandom);
      gr_old = (y >= 2 * R + 1) ? 8'(grr[f][y - 2 * R - 1][x]) : 8'($urandom);
      for (int d = 0; d < DM; d++) begin
        cr_new[d] = COST_W'(cr[f][y][x][d]);
        cr_old[d] = (y >= 2 * R + 1) ? COST_W'(cr[f][y - 2 * R - 1][x][d]) : COST_W'($urandom);
      end
      @(posedge clk);
      if (en) begin
        #1;
        i = t + 1 - LAT;
        if (i >= 0) begin
          void'(at(i, fo, yo, xo));
          yo -= R;
          if (safe_l(xo, yo)) begin
            checks++;
            if (dl != 2'(tl(xo, yo))) begin failures++; if (failures < 10) $display("dl (%0d,%0d) %0d", xo, yo, dl); end
          end
        end
        i = t + 1 - LAT - (DM - 1);
        if (i >= 0) begin
          void'(at(i, fo, yo, xo));
          yo -= R;
          if (safe_r(xo, yo)) begin
            checks++;
            if (dr != 2'(tr(xo, yo))) begin failures++; if (failures < 10) $display("dr (%0d,%0d) %0d", xo, yo, dr); end
          end
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
