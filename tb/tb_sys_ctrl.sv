// tb_sys_ctrl: for a 10 x 6 frame with R = 1, DM = 4, FW = 4, m1 = 3, m2 = 3,
// counts enabled steps (with random stalls) and checks every position output
// against the raster position of the input sample index minus the stage offset.
// The offsets are written out here from the pipeline structure:
//   gradient centre N+2, GIF banks N+5 and N+5+DM-1, L-R check
//   N+5 + R*N + 2R+10 + DM-1, filling +1+FW, filled +1, adaptive centre
//   +1+N+1, its output +1, spike centre +1+N+1, output +1.
module tb_sys_ctrl;
  import gifsm_pkg::*;
  localparam int N = 10, M = 6, R = 1, DM = 4, FW = 4, M1 = 3, M2 = 3;
  localparam int O_GCC = N + 2, O_L = N + 5, O_R = N + 5 + DM - 1;
  localparam int O_LR = N + 5 + R * N + 2 * R + 10 + DM - 1;
  localparam int O_FILL = O_LR + 1 + FW;
  localparam int O_MC = O_FILL + 1 + 1 + N + 1;
  localparam int O_SC = O_MC + 1 + 1 + N + 1;
  localparam int O_OUT = O_SC + 1;
  logic clk = 0, rst = 1, en = 0;
  pos_t gcc_c, cvf_l, cvf_r, lr, fill, med_c, spk_c, out;
  int checks = 0, failures = 0;

  sys_ctrl #(.N(N), .M(M), .R(R), .DM(DM), .FW(FW), .M1(M1), .M2(M2)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input pos_t p, input int t, input int off, input string nm);
    int i = (((t - off) % (M * N)) + M * N) % (M * N);
    checks++;
    if (p.x != 16'(i % N) || p.y != 16'(i / N)) begin
      failures++;
      if (failures < 10) $display("%s at t=%0d: (%0d,%0d), expected (%0d,%0d)", nm, t, p.x, p.y, i % N, i / N);
    end
  endtask

  initial begin
    int t = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (1500) begin
      @(negedge clk);
      chk(gcc_c, t, O_GCC, "gcc"); chk(cvf_l, t, O_L, "cvf_l"); chk(cvf_r, t, O_R, "cvf_r");
      chk(lr, t, O_LR, "lr"); chk(fill, t, O_FILL, "fill"); chk(med_c, t, O_MC, "med");
      chk(spk_c, t, O_SC, "spk"); chk(out, t, O_OUT, "out");
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
