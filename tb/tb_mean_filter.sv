// tb_mean_filter: streams three random 16 x 10 frames (R = 2) with random
// pixel-enable gaps into the mean filter, giving it the pixel of row y as the new
// pixel and of row y-5 (or garbage, with old_pixel_zero set) as the old one. Each
// mean is compared with a direct zero-padded 5 x 5 box sum over the frame array,
// scaled as the filter's fixed-point reciprocal does, at the three-step latency.
module tb_mean_filter;
  localparam int N = 16, M = 10, R = 2, F = 4, FR = 3;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] x;
  logic col_sum_zero, old_pixel_zero;
  logic [7:0] new_pix, old_pix;
  logic [11:0] mean;
  int checks = 0, failures = 0;
  int img [FR][M][N];

  mean_filter #(.IN_W(8), .N(N), .R(R), .OUT_FRAC(F)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, f, xx, yy, idx, xc, yc, fo;
    longint s, e, rc;
    rc = ((longint'(1) << 18) + 12) / 25;
    for (int a = 0; a < FR; a++) for (int b = 0; b < M; b++) for (int c = 0; c < N; c++)
      img[a][b][c] = (a == 1) ? 255 : $urandom_range(0, 255);   // frame 1 saturates the sums
    x = 0; col_sum_zero = 0; old_pixel_zero = 0; new_pix = 0; old_pix = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0;
    while (t < FR * M * N) begin
      f = t / (M * N); yy = (t / N) % M; xx = t % N;
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      x = 16'(xx);
      col_sum_zero = (yy == 0);
      old_pixel_zero = (yy < 2 * R + 1);
      new_pix = 8'(img[f][yy][xx]);
      old_pix = old_pixel_zero ? 8'($urandom) : 8'(img[f][yy - 2 * R - 1][xx]);
      @(posedge clk);
      if (en) begin
        #1;
        idx = t - 2;                    // window whose newest sample was index idx
        if (idx >= 0) begin
          fo = idx / (M * N); yc = (idx / N) % M - R; xc = idx % N - R;
          s = 0;
          for (int a = yc - R; a <= yc + R; a++)
            for (int b = xc - R; b <= xc + R; b++)
              if (a >= 0 && b >= 0 && a < M && b < N) s += img[fo][a][b];
          e = (s * rc) >> (18 - F);
          if (e > 4095) e = 4095;
          checks++;
          if (mean != 12'(e)) begin
            failures++;
            if (failures < 10) $display("mean at f%0d (%0d,%0d): %0d exp %0d", fo, xc, yc, mean, e);
          end
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
