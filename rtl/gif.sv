// gif: guided image filter for one cost slice, built so that its logic does not
// depend on the window radius R. Per step it takes the grey guidance sample and
// the cost sample entering the window (row y: i_new, p_new) and those leaving it
// (row y-2R-1: i_old, p_old). Four mean filters give mean_I, corr_I (mean of
// I*I), corr_Ip (mean of I*p) and mean_p. Then
//   var_I  = corr_I  - mean_I^2            (clamped at 0)
//   cov_Ip = corr_Ip - mean_I * mean_p
//   a      = cov_Ip / (var_I + eps)  with the divisor rounded to the nearest
//            power of two, so the division is an arithmetic right shift
//   b      = mean_p - a * mean_I
//   q      = mean_x(a) * I + mean_x(b)
// where mean_x is a horizontal mean over 2R+1 columns (accumulator + FIFO),
// not a box mean, exactly as the document trades it. I is the guidance at the
// output pixel; it enters as i_mid (row y-R, column x) and is delayed here.
// Fixed point (see gifsm_pkg): means carry MEAN_FRAC fraction bits, a carries
// A_FRAC, b and q carry A_FRAC+MEAN_FRAC. A zero divisor gives a = 0. The
// nearest power of two is 2^m for msb position m, or 2^(m+1) when the bit below
// the msb is set. These number formats are this design's own choices.
// Timing: q for the pixel at row y-R, column x-2R leaves 2R+9 enabled steps
// after the new-row sample of column x (gifsm_pkg::gif_lat).
module gif
  import gifsm_pkg::*;
#(
  parameter int unsigned N   = 1280,
  parameter int unsigned R   = 3,
  parameter int unsigned EPS = 0      // epsilon, in grey levels squared
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic [15:0]           x,              // column of the new-row sample
  input  logic                  col_sum_zero,   // first row of the frame
  input  logic                  old_pixel_zero, // leaving row lies above the image
  input  logic [7:0]            i_new,
  input  logic [7:0]            i_old,
  input  logic [7:0]            i_mid,
  input  logic [COST_W-1:0]     p_new,
  input  logic [COST_W-1:0]     p_old,
  output logic signed [Q_W-1:0] q
);
  localparam int unsigned F = MEAN_FRAC;

  logic [8+F-1:0]  mean_i, mean_p;
  logic [16+F-1:0] corr_i, corr_ip;

  mean_filter #(.IN_W(8),  .N(N), .R(R), .OUT_FRAC(F)) u_mean_i (
    .clk, .rst, .en, .x, .col_sum_zero, .old_pixel_zero,
    .new_pix(i_new), .old_pix(i_old), .mean(mean_i));
  mean_filter #(.IN_W(16), .N(N), .R(R), .OUT_FRAC(F)) u_corr_i (
    .clk, .rst, .en, .x, .col_sum_zero, .old_pixel_zero,
    .new_pix(16'(i_new) * 16'(i_new)), .old_pix(16'(i_old) * 16'(i_old)), .mean(corr_i));
  mean_filter #(.IN_W(16), .N(N), .R(R), .OUT_FRAC(F)) u_corr_ip (
    .clk, .rst, .en, .x, .col_sum_zero, .old_pixel_zero,
    .new_pix(16'(i_new) * 16'(p_new)), .old_pix(16'(i_old) * 16'(p_old)), .mean(corr_ip));
  mean_filter #(.IN_W(COST_W), .N(N), .R(R), .OUT_FRAC(F)) u_mean_p (
    .clk, .rst, .en, .x, .col_sum_zero, .old_pixel_zero,
    .new_pix(p_new), .old_pix(p_old), .mean(mean_p));

  // g1: variance and covariance.
  logic signed [63:0] var_c, cov_c;
  logic [31:0]        var_q;
  logic signed [31:0] cov_q;
  logic [15:0]        mi_1, mp_1, mi_2, mp_2;
  always_comb begin
    var_c = 64'(corr_i)  - ((64'(mean_i) * 64'(mean_i)) >>> F);
    cov_c = 64'(corr_ip) - ((64'(mean_i) * 64'(mean_p)) >>> F);
  end
  always_ff @(posedge clk) begin
    if (en) begin
      var_q <= (var_c < 0) ? 32'd0 : 32'(var_c);
      cov_q <= 32'(cov_c);
      mi_1  <= 16'(mean_i);
      mp_1  <= 16'(mean_p);
    end
  end

  // g2: a = cov / nearest_pow2(var + eps) as a shift.
  logic [31:0]        den;
  logic [5:0]         k;
  logic signed [63:0] a_c;
  logic signed [A_W-1:0] a_2, a_3;
  always_comb begin
    den = var_q + 32'(EPS << F);
    k   = '0;
    for (int i = 0; i < 32; i++) begin
      if (den[i]) k = 6'(i);
    end
    if (k != 0 && den[k-1]) k = k + 6'd1;
    a_c = (den == 0) ? 64'sd0 : ((64'(cov_q) <<< A_FRAC) >>> k);
  end
  always_ff @(posedge clk) begin
    if (en) begin
      a_2  <= A_W'(a_c);
      mi_2 <= mi_1;
      mp_2 <= mp_1;
    end
  end

  // g3: b = mean_p - a * mean_I.
  logic signed [B_W-1:0] b_3;
  always_ff @(posedge clk) begin
    if (en) begin
      a_3 <= a_2;
      b_3 <= B_W'((64'(mp_2) <<< A_FRAC) - 64'(a_2) * 64'(mi_2));
    end
  end

  // Column of the a/b stream, for clearing the horizontal means at column 0.
  logic [15:0] x_ab;
  delay_line #(.W(16), .D(R + 6)) u_xdel (.clk, .en, .din(x), .dout(x_ab));

  logic signed [A_W-1:0] mean_a;
  logic signed [B_W-1:0] mean_b;
  meanx #(.W(A_W), .R(R)) u_mean_a (.clk, .rst, .en, .first(x_ab == 16'd0), .din(a_3), .mean(mean_a));
  meanx #(.W(B_W), .R(R)) u_mean_b (.clk, .rst, .en, .first(x_ab == 16'd0), .din(b_3), .mean(mean_b));

  // Guidance at the output pixel.
  logic [7:0] i_ctr;
  delay_line #(.W(8), .D(2 * R + 8)) u_idel (.clk, .en, .din(i_mid), .dout(i_ctr));

  always_ff @(posedge clk) begin
    if (en) q <= Q_W'(((64'(mean_a) * 64'(i_ctr)) <<< F) + 64'(mean_b));
  end
endmodule
