// tb_ccu: checks the matching cost for random pixel pairs and for pairs built to
// hit each truncation: identical pixels (cost 0), large colour difference only
// (colour term saturates at TC), large gradient difference only (gradient term
// saturates at TG), and small differences below both thresholds.
module tb_ccu;
  import gifsm_pkg::*;
  pix_t ref_pix, tgt_pix;
  logic [COST_W-1:0] cost;
  int checks = 0, failures = 0;
  ccu dut (.*);

  function automatic int ad(int a, int b); return (a > b) ? a - b : b - a; endfunction

  task automatic check(input pix_t a, input pix_t b);
    int cm, g, e;
    ref_pix = a; tgt_pix = b;
    #1;
    cm = ((ad(a.r, b.r) + ad(a.g, b.g) + ad(a.b, b.b)) * 171) / 512;   // mean colour difference
    g  = ad(a.gx, b.gx) + ad(a.gy, b.gy);
    e  = ((cm < 7) ? cm : 7) * 8 + ((g < 2) ? g : 2) * 64;
    checks++;
    if (cost != COST_W'(e)) begin
      failures++;
      if (failures < 10) $display("cost %0d expected %0d", cost, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_t a, b;
    a = 40'h1122334455; check(a, a);
    if (cost != 0) failures++;
    b = a; b.r = 8'hFF; check(a, b);            // colour only, saturated: 7*8
    checks++; if (cost != 8'd56) failures++;
    b = a; b.gx = 8'h00; check(a, b);           // gradient only, saturated: 2*64
    checks++; if (cost != 8'd128) failures++;
    b = a; b.g = a.g + 8'd6; b.gy = a.gy + 8'd1; check(a, b);  // 6/3=2 -> 16, 1 -> 64
    checks++; if (cost != 8'd80) failures++;
    repeat (20000) begin
      a = {$urandom, 8'($urandom)};
      b = {$urandom, 8'($urandom)};
      if ($urandom_range(0, 1)) b = a ^ 40'({$urandom_range(0, 7), 8'h0, 8'h0, 8'h0, 8'h0} | 40'($urandom_range(0, 3)));
      check(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
