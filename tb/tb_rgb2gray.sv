// tb_rgb2gray: checks the grey conversion on fixed corner cases and 20000 random
// colours against the BT.601 8-bit formula evaluated in integer arithmetic.
module tb_rgb2gray;
  logic [23:0] rgb;
  logic [7:0]  gray;
  int checks = 0, failures = 0;
  rgb2gray dut (.*);

  task automatic check(input int r, input int g, input int b);
    int e;
    rgb = {8'(r), 8'(g), 8'(b)};
    #1;
    e = (77 * r + 150 * g + 29 * b) / 256;
    checks++;
    if (gray != 8'(e)) begin
      failures++;
      if (failures < 10) $display("rgb2gray(%0d,%0d,%0d) = %0d, expected %0d", r, g, b, gray, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0); check(255, 255, 255); check(255, 0, 0); check(0, 255, 0); check(0, 0, 255);
    checks++; if (gray != 8'd28) failures++;   // pure blue: 29*255/256 = 28
    repeat (20000) check($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
