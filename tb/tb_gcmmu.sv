// tb_gcmmu: streams three random 12 x 10 stereo frames (R = 1, DM = 4) with
// enable gaps. At the N+4 step offset it checks, against the frame arrays:
// the left new pixel (colour and gradients, gradients recomputed here with the
// Sobel formula), the left old pixel 2R+1 rows up, every right new/old pixel
// d columns to the left, and the grey guidance of the new, old and middle rows
// (the right ones DM-1 columns back).
module tb_gcmmu;
  import gifsm_pkg::*;
  localparam int N = 12, M = 10, R = 1, DM = 4, FR = 3;
  localparam int A = N + 4;
  logic clk = 0, rst = 1, en = 0;
  logic [23:0] l_rgb, r_rgb;
  logic [15:0] cx, cy;
  pix_t l_new, l_old;
  pix_t r_new [DM];
  pix_t r_old [DM];
  logic [7:0] gl_new, gl_old, gl_mid, gr_new, gr_old, gr_mid;
  int checks = 0, failures = 0;
  logic [23:0] img [2][FR][M][N];

  gcmmu #(.N(N), .M(M), .R(R), .DM(DM)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gray_of(logic [23:0] p);
    return (77 * p[23:16] + 150 * p[15:8] + 29 * p[7:0]) / 256;
  endfunction
  function automatic int g(int s, int f, int y, int x);
    return gray_of(img[s][f][y][x]);
  endfunction
  // expected pix_t of image s at linear index i (frame-relative position)
  function automatic pix_t px(int s, int i);
    int f = i / (M * N), y = (i / N) % M, x = i % N, sx, sy;
    pix_t p;
    p.r = img[s][f][y][x][23:16]; p.g = img[s][f][y][x][15:8]; p.b = img[s][f][y][x][7:0];
    if (x == 0 || y == 0 || x == N - 1 || y == M - 1) begin
      p.gx = 8'd127; p.gy = 8'd127;
    end else begin
      sx = g(s,f,y-1,x+1) + 2*g(s,f,y,x+1) + g(s,f,y+1,x+1) - g(s,f,y-1,x-1) - 2*g(s,f,y,x-1) - g(s,f,y+1,x-1);
      sy = g(s,f,y+1,x-1) + 2*g(s,f,y+1,x) + g(s,f,y+1,x+1) - g(s,f,y-1,x-1) - 2*g(s,f,y-1,x) - g(s,f,y-1,x+1);
      p.gx = 8'((sx + 1020) / 8); p.gy = 8'((sy + 1020) / 8);
    end
    return p;
  endfunction

  task automatic cmp(input pix_t got, input pix_t exp_p, input string nm);
    checks++;
    if (got !== exp_p) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", nm, got, exp_p);
    end
  endtask
  task automatic cmpg(input logic [7:0] got, input int exp_g, input string nm);
    checks++;
    if (got != 8'(exp_g)) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", nm, got, exp_g);
    end
  endtask

  initial begin
    int t, i, ic;
    for (int s = 0; s < 2; s++) for (int a = 0; a < FR; a++) for (int b = 0; b < M; b++) for (int c = 0; c < N; c++)
      img[s][a][b][c] = 24'($urandom);
    l_rgb = 0; r_rgb = 0; cx = 0; cy = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0;
    while (t < FR * M * N) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      l_rgb = img[0][t / (M * N)][(t / N) % M][t % N];
      r_rgb = img[1][t / (M * N)][(t / N) % M][t % N];
      ic = (((t - (N + 2)) % (M * N)) + M * N) % (M * N);   // gradient window centre
      cx = 16'(ic % N);
      cy = 16'(ic / N);
      @(posedge clk);
      if (en) begin
        #1;
        i = t + 1 - A;                                  // index of the new pixel on the outputs
        if (i >= M * N) begin                            // from the second frame on
          cmp(l_new, px(0, i), "l_new");
          cmp(l_old, px(0, i - (2 * R + 1) * N), "l_old");
          for (int d = 0; d < DM; d++) begin
            cmp(r_new[d], px(1, i - d), "r_new");
            cmp(r_old[d], px(1, i - d - (2 * R + 1) * N), "r_old");
          end
          cmpg(gl_new, gray_of({l_new.r, l_new.g, l_new.b}), "gl_new");
          cmpg(gl_old, gray_of(img[0][(i - (2*R+1)*N) / (M*N)][((i - (2*R+1)*N) / N) % M][(i - (2*R+1)*N) % N]), "gl_old");
          cmpg(gl_mid, gray_of(img[0][(i - R*N) / (M*N)][((i - R*N) / N) % M][(i - R*N) % N]), "gl_mid");
          cmpg(gr_new, gray_of(img[1][(i - DM + 1) / (M*N)][((i - DM + 1) / N) % M][(i - DM + 1) % N]), "gr_new");
          cmpg(gr_mid, gray_of(img[1][(i - DM + 1 - R*N) / (M*N)][((i - DM + 1 - R*N) / N) % M][(i - DM + 1 - R*N) % N]), "gr_mid");
          cmpg(gr_old, gray_of(img[1][(i - DM + 1 - (2*R+1)*N) / (M*N)][((i - DM + 1 - (2*R+1)*N) / N) % M][(i - DM + 1 - (2*R+1)*N) % N]), "gr_old");
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
