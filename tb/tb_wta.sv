// tb_wta: feeds random signed cost vectors (including ties and negative values)
// to a 64-way WTA with random enable gaps and checks that the registered output
// is the lowest index of the minimum, one enabled step later.
module tb_wta;
  import gifsm_pkg::*;
  localparam int D = 64;
  logic clk = 0, en = 0;
  logic signed [Q_W-1:0] cost [D];
  logic [5:0] disp;
  int checks = 0, failures = 0;
  wta #(.D(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_i, prev_exp;
    longint best;
    prev_exp = -1;
    repeat (5000) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      for (int d = 0; d < D; d++)
        cost[d] = Q_W'($signed($urandom_range(0, 1) ? -$urandom_range(0, 50) : $urandom_range(0, 50)) <<< $urandom_range(0, 30));
      if ($urandom_range(0, 3) == 0) cost[$urandom_range(0, D - 1)] = cost[$urandom_range(0, D - 1)];
      best = cost[0]; exp_i = 0;
      for (int d = 1; d < D; d++) if (cost[d] < best) begin best = cost[d]; exp_i = d; end
      @(posedge clk);
      #1;
      if (en) begin
        checks++;
        if (disp != 6'(exp_i)) begin
          failures++;
          if (failures < 10) $display("wta %0d expected %0d", disp, exp_i);
        end
        prev_exp = exp_i;
      end else if (prev_exp >= 0) begin
        checks++;
        if (disp != 6'(prev_exp)) failures++;   // held while stalled
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
