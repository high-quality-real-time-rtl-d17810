// tb_dru: the refinement unit on random 20 x 12 left/right disparity maps
// (DM = 8, FW = 8, R = 1, m1 = 5, m2 = 3) that are partly consistent, with a
// grey image of a few flat regions for the segments. The system controller
// supplies the stage positions; the maps are presented at the offsets the
// matcher's CVFDSU produces them at. The reference model applies, frame by
// frame: L-R check and filling, the 5 x 5 median over the pixels of the
// centre's segment, the 3 x 3 plain median, with border centres passed through.
// Every output pixel from the third frame on is compared; each event output
// must have fired.
module tb_dru;
  import gifsm_pkg::*;
  localparam int N = 20, M = 12, DM = 8, FW = 8, R = 1, M1 = 5, M2 = 3, FR = 4;
  localparam int O_DL = off_dl(N, R), O_SEG = N + 4 + R * N;
  logic clk = 0, rst = 1, en = 0;
  logic [2:0] dl, dr, disp;
  logic [7:0] gray_seg;
  pos_t gcc_c, cvf_l, cvf_r, lr, fill, med_c, spk_c, out;
  logic ev_invalid, ev_median, ev_spike;
  int checks = 0, failures = 0, n_inv = 0, n_med = 0, n_spk = 0;
  int L [M][N];
  int Rm [M][N];
  int G [M][N];
  int Fl [M][N];
  int A1 [M][N];
  int A2 [M][N];

  sys_ctrl #(.N(N), .M(M), .R(R), .DM(DM), .FW(FW), .M1(M1), .M2(M2)) u_ctrl (.clk, .rst, .en, .*);
  dru #(.N(N), .M(M), .R(R), .DM(DM), .FW(FW), .M1(M1), .M2(M2)) dut (
    .clk, .rst, .en, .dl, .dr, .gray_seg, .x_lr(lr.x), .x_fill(fill.x), .mc_x(med_c.x), .mc_y(med_c.y),
    .sc_x(spk_c.x), .sc_y(spk_c.y), .disp, .ev_invalid, .ev_median, .ev_spike);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(int y, int x);
    int d = L[y][x], e;
    if (x < d) return 0;
    e = d - Rm[y][x - d];
    return (e >= -1 && e <= 1);
  endfunction
  function automatic int med(int v[$]);
    v.sort();
    return v[v.size() / 2];
  endfunction

  // one frame's reference
  task automatic model();
    int lv, rv, v[$];
    bit hl, hr;
    for (int y = 0; y < M; y++) for (int x = 0; x < N; x++) begin
      if (ok(y, x)) Fl[y][x] = L[y][x];
      else begin
        hl = 0; hr = 0; lv = 0; rv = 0;
        for (int c = x - 1; c >= 0 && !hl; c--) if (ok(y, c)) begin hl = 1; lv = L[y][c]; end
        for (int c = x + 1; c <= x + FW && c < N && !hr; c++) if (ok(y, c)) begin hr = 1; rv = L[y][c]; end
        Fl[y][x] = (hl && hr) ? ((lv < rv) ? lv : rv) : hl ? lv : hr ? rv : 0;
      end
    end
    for (int y = 0; y < M; y++) for (int x = 0; x < N; x++) begin
      if (x < 2 || y < 2 || x > N - 3 || y > M - 3) A1[y][x] = Fl[y][x];
      else begin
        v.delete();
        for (int a = y - 2; a <= y + 2; a++) for (int b = x - 2; b <= x + 2; b++)
          if (G[a][b] / 32 == G[y][x] / 32) v.push_back(Fl[a][b]);
        A1[y][x] = med(v);
      end
    end
    for (int y = 0; y < M; y++) for (int x = 0; x < N; x++) begin
      if (x < 1 || y < 1 || x > N - 2 || y > M - 2) A2[y][x] = A1[y][x];
      else begin
        v.delete();
        for (int a = y - 1; a <= y + 1; a++) for (int b = x - 1; b <= x + 1; b++) v.push_back(A1[a][b]);
        A2[y][x] = med(v);
      end
    end
  endtask

  initial begin
    int t, i;
    for (int y = 0; y < M; y++) for (int x = 0; x < N; x++) begin
      int base = (x < N / 2) ? 2 : 5;
      G[y][x] = (x < N / 2) ? 40 : ((y < M / 2) ? 130 : 230);
      Rm[y][x] = $urandom_range(0, DM - 1);
      L[y][x] = ($urandom_range(0, 4) == 0) ? $urandom_range(0, DM - 1) : base;
    end
    for (int y = 0; y < M; y++) for (int x = 0; x < N; x++)
      if (x >= L[y][x] && $urandom_range(0, 3) != 0) Rm[y][x - L[y][x]] = L[y][x];
    model();
    dl = 0; dr = 0; gray_seg = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0;
    while (t < FR * M * N) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      i = ((t - O_DL) % (M * N) + M * N) % (M * N);
      dl = 3'(L[i / N][i % N]);
      i = ((t - O_DL - (DM - 1)) % (M * N) + M * N) % (M * N);
      dr = 3'(Rm[i / N][i % N]);
      i = ((t - O_SEG) % (M * N) + M * N) % (M * N);
      gray_seg = 8'(G[i / N][i % N]);
      @(posedge clk);
      if (en) begin
        #1;
        n_inv += int'(ev_invalid); n_med += int'(ev_median); n_spk += int'(ev_spike);
        if (t >= 2 * M * N) begin
          checks++;
          if (disp != 3'(A2[out.y][out.x])) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d): %0d exp %0d (filled %0d, median %0d)", out.x, out.y, disp,
                                        A2[out.y][out.x], Fl[out.y][out.x], A1[out.y][out.x]);
          end
        end
        t++;
      end
    end
    $display("events: invalid=%0d median=%0d spike=%0d", n_inv, n_med, n_spk);
    checks += 3;
    if (n_inv == 0) failures++;
    if (n_med == 0) failures++;
    if (n_spk == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
