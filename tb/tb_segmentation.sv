// tb_segmentation: all 256 grey levels; with 8 equal bands the label must be the
// top three bits of the grey level.
module tb_segmentation;
  logic [7:0] gray;
  logic [2:0] label;
  int checks = 0, failures = 0;
  segmentation #(.L(8)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int g = 0; g < 256; g++) begin
      gray = 8'(g);
      #1;
      checks++;
      if (label != 3'(g / 32)) begin
        failures++;
        $display("label(%0d) = %0d", g, label);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
