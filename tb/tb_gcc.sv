// tb_gcc: streams three random 12 x 8 frames with random enable gaps through the
// gradient core and checks both normalised Sobel outputs against a direct
// evaluation on the frame array (grey by the BT.601 formula, Sobel kernels,
// (g+1020)>>3), 127 on border centres, at the N+3 step latency.
module tb_gcc;
  localparam int N = 12, M = 8, FR = 3;
  logic clk = 0, rst = 1, en = 0;
  logic [23:0] rgb;
  logic [15:0] cx, cy;
  logic [7:0] gx, gy;
  int checks = 0, failures = 0;
  logic [23:0] img [FR][M][N];

  gcc #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gr(int f, int y, int x);
    logic [23:0] p = img[f][y][x];
    return (77 * p[23:16] + 150 * p[15:8] + 29 * p[7:0]) / 256;
  endfunction

  initial begin
    int t, idx, f, yc, xc, ex, ey, sx, sy;
    for (int a = 0; a < FR; a++) for (int b = 0; b < M; b++) for (int c = 0; c < N; c++)
      img[a][b][c] = (a == 1 && c > N / 2) ? 24'hFFFFFF : (a == 1 ? 24'h0 : 24'($urandom));
    rgb = 0; cx = 0; cy = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0;
    while (t < FR * M * N) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      rgb = img[t / (M * N)][(t / N) % M][t % N];
      idx = t - (N + 2);      // window centre presented with this sample
      cx = 16'(((idx % N) + N) % N);
      cy = 16'((((idx / N) % M) + M) % M);
      if (idx < 0) begin cx = 16'(N - 1); cy = 16'(M - 1); end
      @(posedge clk);
      if (en) begin
        #1;
        if (idx >= 0) begin
          f = idx / (M * N); yc = (idx / N) % M; xc = idx % N;
          if (xc == 0 || yc == 0 || xc == N - 1 || yc == M - 1) begin
            ex = 127; ey = 127;
          end else begin
            sx = gr(f, yc - 1, xc + 1) + 2 * gr(f, yc, xc + 1) + gr(f, yc + 1, xc + 1)
               - gr(f, yc - 1, xc - 1) - 2 * gr(f, yc, xc - 1) - gr(f, yc + 1, xc - 1);
            sy = gr(f, yc + 1, xc - 1) + 2 * gr(f, yc + 1, xc) + gr(f, yc + 1, xc + 1)
               - gr(f, yc - 1, xc - 1) - 2 * gr(f, yc - 1, xc) - gr(f, yc - 1, xc + 1);
            ex = (sx + 1020) / 8; ey = (sy + 1020) / 8;
          end
          checks += 2;
          if (gx != 8'(ex)) begin failures++; if (failures < 10) $display("gx f%0d (%0d,%0d) %0d exp %0d", f, xc, yc, gx, ex); end
          if (gy != 8'(ey)) begin failures++; if (failures < 10) $display("gy f%0d (%0d,%0d) %0d exp %0d", f, xc, yc, gy, ey); end
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
