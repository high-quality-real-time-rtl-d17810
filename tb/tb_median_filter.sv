// tb_median_filter: random 5x5 windows (adaptive instance, random labels drawn
// from few segments) and random 3x3 windows (plain instance). The reference
// collects the values whose label equals the centre's (all values for the plain
// filter), sorts them and takes element floor(W/2); bypass must return the
// centre. Windows with few distinct values make ties common.
module tb_median_filter;
  logic clk = 0, en = 1;
  logic byp_a, byp_p;
  logic [5:0] da [5][5];
  logic [2:0] la [5][5];
  logic [5:0] dp [3][3];
  logic [0:0] lp [3][3];
  logic [5:0] med_a, med_p;
  logic ch_a, ch_p;
  int checks = 0, failures = 0;

  median_filter #(.MW(5), .DW(6), .SW(3), .ADAPTIVE(1'b1)) u_a (
    .clk, .en, .bypass(byp_a), .disp(da), .label(la), .median(med_a), .changed(ch_a));
  median_filter #(.MW(3), .DW(6), .SW(1), .ADAPTIVE(1'b0)) u_p (
    .clk, .en, .bypass(byp_p), .disp(dp), .label(lp), .median(med_p), .changed(ch_p));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int med_of(int v[$]);
    v.sort();
    return v[v.size() / 2];
  endfunction

  initial begin
    int va[$], vp[$];
    int ea, ep, spread;
    repeat (4000) begin
      @(negedge clk);
      spread = $urandom_range(0, 1) ? 63 : 3;
      byp_a = ($urandom_range(0, 9) == 0);
      byp_p = ($urandom_range(0, 9) == 0);
      va.delete(); vp.delete();
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          da[i][j] = 6'($urandom_range(0, spread));
          la[i][j] = 3'($urandom_range(0, 2));
        end
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++)
          if (la[i][j] == la[2][2]) va.push_back(da[i][j]);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          dp[i][j] = 6'($urandom_range(0, spread));
          lp[i][j] = 1'($urandom);
          vp.push_back(dp[i][j]);
        end
      ea = byp_a ? da[2][2] : med_of(va);
      ep = byp_p ? dp[1][1] : med_of(vp);
      @(posedge clk);
      #1;
      checks += 2;
      if (med_a != 6'(ea)) begin failures++; if (failures < 10) $display("adaptive %0d exp %0d", med_a, ea); end
      if (med_p != 6'(ep)) begin failures++; if (failures < 10) $display("plain %0d exp %0d", med_p, ep); end
      checks += 2;
      if (ch_a != (ea != da[2][2])) failures++;
      if (ch_p != (ep != dp[1][1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
