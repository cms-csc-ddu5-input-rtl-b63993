// tb_notall4: exhaustive check of the four-bit consistency test against
// "some but not all bits set".
module tb_notall4;
  logic [3:0] b;
  logic any, all, notall;
  int checks = 0, failures = 0;

  notall4 dut (.b, .any, .all, .notall);

  initial begin
    for (int v = 0; v < 16; v++) begin
      b = 4'(v);
      #1;
      checks++;
      if (notall !== (v != 0 && v != 15) || any !== (v != 0) || all !== (v == 15)) begin
        failures++;
        $display("FAIL b=%b any=%b all=%b notall=%b", b, any, all, notall);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
