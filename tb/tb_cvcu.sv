// tb_cvcu: drives random left/right pixels (DM = 8) with enable gaps and keeps a
// history of them. One enabled step later each left cost must equal the CCU
// formula for (left, right[d]) of the previous step, and each right cost of
// slice d must equal the left cost of slice d computed DM-1-d steps before
// (C_R(x', d) = C_L(x'+d, d)); the guidance must come out one step late.
module tb_cvcu;
  import gifsm_pkg::*;
  localparam int DM = 8, H = 4000;
  logic clk = 0, en = 0;
  pix_t l_new, l_old;
  pix_t r_new [DM];
  pix_t r_old [DM];
  logic [7:0] gl_new_i, gl_old_i, gl_mid_i, gr_new_i, gr_old_i, gr_mid_i;
  logic [COST_W-1:0] cl_new [DM];
  logic [COST_W-1:0] cl_old [DM];
  logic [COST_W-1:0] cr_new [DM];
  logic [COST_W-1:0] cr_old [DM];
  logic [7:0] gl_new, gl_old, gl_mid, gr_new, gr_old, gr_mid;
  int checks = 0, failures = 0;
  int hn [H][DM];
  int ho [H][DM];

  cvcu #(.DM(DM)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ad(int a, int b); return (a > b) ? a - b : b - a; endfunction
  function automatic int cst(pix_t a, pix_t b);
    int cm = ((ad(a.r, b.r) + ad(a.g, b.g) + ad(a.b, b.b)) * 171) / 512;
    int g  = ad(a.gx, b.gx) + ad(a.gy, b.gy);
    return ((cm < 7) ? cm : 7) * 8 + ((g < 2) ? g : 2) * 64;
  endfunction
  function automatic pix_t rnd(pix_t base);
    pix_t p = base;
    p.r = base.r + 8'($urandom_range(0, 30)); p.gx = base.gx + 8'($urandom_range(0, 2));
    return p;
  endfunction

  initial begin
    int t = 0;
    pix_t base;
    while (t < H) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      base = {$urandom, 8'($urandom)};
      l_new = base; l_old = rnd(base);
      for (int d = 0; d < DM; d++) begin r_new[d] = rnd(base); r_old[d] = rnd(base); end
      gl_new_i = 8'($urandom); gl_old_i = gl_new_i + 1; gl_mid_i = gl_new_i + 2;
      gr_new_i = gl_new_i + 3; gr_old_i = gl_new_i + 4; gr_mid_i = gl_new_i + 5;
      if (en) for (int d = 0; d < DM; d++) begin
        hn[t][d] = cst(l_new, r_new[d]);
        ho[t][d] = cst(l_old, r_old[d]);
      end
      @(posedge clk);
      if (en) begin
        #1;
        for (int d = 0; d < DM; d++) begin
          checks += 2;
          if (cl_new[d] != COST_W'(hn[t][d])) failures++;
          if (cl_old[d] != COST_W'(ho[t][d])) failures++;
          if (t >= DM) begin
            checks += 2;
            if (cr_new[d] != COST_W'(hn[t - (DM - 1 - d)][d])) begin
              failures++;
              if (failures < 10) $display("cr_new[%0d] t=%0d: %0d exp %0d", d, t, cr_new[d], hn[t - (DM - 1 - d)][d]);
            end
            if (cr_old[d] != COST_W'(ho[t - (DM - 1 - d)][d])) failures++;
          end
        end
        checks++;
        if (gl_new != gl_new_i || gl_old != 8'(gl_new_i + 1) || gl_mid != 8'(gl_new_i + 2) ||
            gr_new != 8'(gl_new_i + 3) || gr_old != 8'(gl_new_i + 4) || gr_mid != 8'(gl_new_i + 5)) failures++;
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
