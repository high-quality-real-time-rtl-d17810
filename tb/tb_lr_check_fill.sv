// tb_lr_check_fill: random left/right disparity maps (20 x 8, DM = 8, FW = 8),
// made mostly consistent with random breaks, are streamed with enable gaps. The
// reference marks a pixel valid when x >= D_L and |D_L - D_R(x-D_L)| <= 1, and
// fills an invalid one with the smaller of the nearest valid pixel to the left
// (any distance, same row) and to the right (within FW, same row), or 0.
module tb_lr_check_fill;
  localparam int N = 20, M = 8, DM = 8, FW = 8, FR = 3;
  logic clk = 0, rst = 1, en = 0;
  logic [2:0] dl, dr, disp;
  logic [15:0] x_lr, x_fill;
  logic invalid;
  int checks = 0, failures = 0, n_inv = 0;
  int L [FR][M][N];
  int Rm [FR][M][N];

  lr_check_fill #(.N(N), .DM(DM), .FW(FW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(int f, int y, int x);
    int d = L[f][y][x];
    int e;
    if (x < d) return 0;
    e = d - Rm[f][y][x - d];
    return (e >= -1 && e <= 1);
  endfunction

  initial begin
    int t, idx, f, y, xx, e, lv, rv;
    bit hl, hr;
    for (int a = 0; a < FR; a++) for (int b = 0; b < M; b++) for (int c = 0; c < N; c++) begin
      Rm[a][b][c] = $urandom_range(0, DM - 1);
    end
    for (int a = 0; a < FR; a++) for (int b = 0; b < M; b++) for (int c = 0; c < N; c++) begin
      int d = $urandom_range(0, DM - 1);
      if (c >= d && $urandom_range(0, 2) != 0) Rm[a][b][c - d] = d;
      L[a][b][c] = d;
    end
    dl = 0; dr = 0; x_lr = 0; x_fill = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0;
    while (t < FR * M * N) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      dl = 3'(L[t / (M * N)][(t / N) % M][t % N]);
      dr = 3'(Rm[t / (M * N)][(t / N) % M][t % N]);
      x_lr = 16'(t % N);
      x_fill = 16'((((t - 1 - FW) % N) + N) % N);
      @(posedge clk);
      if (en) begin
        #1;
        idx = t - FW - 1;
        if (idx >= 0) begin
          f = idx / (M * N); y = (idx / N) % M; xx = idx % N;
          if (ok(f, y, xx)) e = L[f][y][xx];
          else begin
            hl = 0; hr = 0; lv = 0; rv = 0;
            for (int c = xx - 1; c >= 0 && !hl; c--) if (ok(f, y, c)) begin hl = 1; lv = L[f][y][c]; end
            for (int c = xx + 1; c <= xx + FW && c < N && !hr; c++) if (ok(f, y, c)) begin hr = 1; rv = L[f][y][c]; end
            e = (hl && hr) ? ((lv < rv) ? lv : rv) : hl ? lv : hr ? rv : 0;
          end
          checks += 2;
          if (disp != 3'(e)) begin failures++; if (failures < 10) $display("f%0d (%0d,%0d): %0d exp %0d", f, xx, y, disp, e); end
          if (invalid != !ok(f, y, xx)) failures++;
          n_inv += int'(invalid);
        end
        t++;
      end
    end
    checks++; if (n_inv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
