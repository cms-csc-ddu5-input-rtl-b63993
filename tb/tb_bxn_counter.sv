// tb_bxn_counter: the count must run 0..923 and wrap, i.e. one orbit every
// 924 clocks, and restart at 0 after bc0.
module tb_bxn_counter;
  logic clk = 0, rst = 1, bc0 = 0;
  logic [11:0] bxn;
  logic wrap;
  int checks = 0, failures = 0;
  int exp_v;

  bxn_counter dut (.clk, .rst, .bc0, .bxn, .wrap);

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1 rst = 0;
    exp_v = 0;
    for (int t = 0; t < 3000; t++) begin
      checks++;
      if (int'(bxn) != exp_v || wrap != (exp_v == 923)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d bxn=%0d exp=%0d", t, bxn, exp_v);
      end
      if (t == 2500) bc0 = 1;
      @(posedge clk); #1;
      exp_v = (bc0 || exp_v == 923) ? 0 : exp_v + 1;
      bc0 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
