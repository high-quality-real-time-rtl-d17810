// tb_gif: self-checking test of the guided filter. Streams two random frames
// (random grey guidance, random costs 0..184) with random pixel-enable gaps
// through a small gif (N=16, M=12, R=2, EPS=1), and compares every q whose
// windows lie inside the frame (plus the zero-padded left/top edges) against a
// direct, non-streaming evaluation of the same fixed-point formulas: box sums
// over the frame arrays, var/cov, power-of-two division, horizontal means.
// Also checks the 2R+9 step latency by construction of the expected index.
module tb_gif;
  import gifsm_pkg::*;
  localparam int N = 16, M = 12, R = 2, EPS = 1, F = MEAN_FRAC;
  localparam int LAT = 2 * R + 9;
  localparam int FRAMES = 3;

  logic clk = 0, rst = 1, en = 0;
  logic [15:0] x;
  logic col_sum_zero, old_pixel_zero;
  logic [7:0] i_new, i_old, i_mid, p_new, p_old;
  logic signed [Q_W-1:0] q;
  int checks = 0, failures = 0;

  gif #(.N(N), .R(R), .EPS(EPS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [FRAMES][M][N];
  int cst [FRAMES][M][N];

  function automatic longint box(int f, int yc, int xc, int kind);
    longint s = 0;
    for (int yy = yc - R; yy <= yc + R; yy++)
      for (int xx = xc - R; xx <= xc + R; xx++)
        if (yy >= 0 && xx >= 0 && yy < M && xx < N)
          case (kind)
            0: s += img[f][yy][xx];
            1: s += img[f][yy][xx] * img[f][yy][xx];
            2: s += img[f][yy][xx] * cst[f][yy][xx];
            default: s += cst[f][yy][xx];
          endcase
    return s;
  endfunction

  function automatic longint bmean(longint s, int w);
    longint k2 = (2 * R + 1) * (2 * R + 1);
    longint rc = ((longint'(1) << 18) + k2 / 2) / k2;
    longint v  = (s * rc) >> (18 - F);
    longint mx = (longint'(1) << (w + F)) - 1;
    return (v > mx) ? mx : v;
  endfunction

  // a and b of the window centred at (xc, yc)
  function automatic void ab(int f, int yc, int xc, output longint a, output longint b);
    longint mi = bmean(box(f, yc, xc, 0), 8);
    longint ci = bmean(box(f, yc, xc, 1), 16);
    longint cip = bmean(box(f, yc, xc, 2), 16);
    longint mp = bmean(box(f, yc, xc, 3), 8);
    longint vr = ci - ((mi * mi) >> F);
    longint cv = cip - ((mi * mp) >> F);
    longint den;
    int k;
    if (vr < 0) vr = 0;
    den = vr + (EPS << F);
    k = 0;
    for (int i = 0; i < 32; i++) if (den[i]) k = i;
    if (k != 0 && den[k-1]) k++;
    a = (den == 0) ? 0 : ((cv <<< A_FRAC) >>> k);
    b = (mp <<< A_FRAC) - a * mi;
  endfunction

  function automatic longint ref_q(int f, int yc, int xc);
    longint sa = 0, sb = 0, a, b, rx, ma, mb, qq;
    for (int c = xc - R; c <= xc + R; c++) if (c >= 0) begin
      ab(f, yc, c, a, b);
      sa += a; sb += b;
    end
    rx = ((longint'(1) << 16) + (2 * R + 1) / 2) / (2 * R + 1);
    ma = (sa * rx) >>> 16;
    mb = (sb * rx) >>> 16;
    qq = ((ma * img[f][yc][xc]) <<< F) + mb;
    return qq;
  endfunction

  initial begin
    int t, idx, f, xx, yy, fo, xo, yo;
    for (int f2 = 0; f2 < FRAMES; f2++)
      for (int yy2 = 0; yy2 < M; yy2++)
        for (int xx2 = 0; xx2 < N; xx2++) begin
          // frame 1 is flat guidance, exercising the zero-divisor and small-variance paths
          img[f2][yy2][xx2] = (f2 == 1) ? 100 : $urandom_range(0, 255);
          cst[f2][yy2][xx2] = $urandom_range(0, 184);
        end
    x = 0; col_sum_zero = 0; old_pixel_zero = 0;
    i_new = 0; i_old = 0; i_mid = 0; p_new = 0; p_old = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    t = 0;
    while (t < FRAMES * M * N) begin
      f = t / (M * N); yy = (t / N) % M; xx = t % N;
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      x = 16'(xx);
      col_sum_zero = (yy == 0);
      old_pixel_zero = (yy < 2 * R + 1);
      i_new = 8'(img[f][yy][xx]);
      p_new = 8'(cst[f][yy][xx]);
      i_old = old_pixel_zero ? 8'($urandom) : 8'(img[f][yy-2*R-1][xx]);
      p_old = old_pixel_zero ? 8'($urandom) : 8'(cst[f][yy-2*R-1][xx]);
      i_mid = (yy < R) ? 8'($urandom) : 8'(img[f][yy-R][xx]);
      @(posedge clk);
      if (en) begin
        #1;
        idx = t + 1 - LAT;
        if (idx >= 0) begin
          fo = idx / (M * N); yo = (idx / N) % M - R; xo = idx % N;
          if (yo >= 0 && xo + 2 * R <= N - 1) begin
            longint exp_q;
            exp_q = ref_q(fo, yo, xo);
            checks++;
            if (q !== Q_W'(exp_q)) begin
              failures++;
              if (failures < 10) $display("q mismatch f%0d (%0d,%0d): got %0d exp %0d", fo, xo, yo, q, exp_q);
            end
          end
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
