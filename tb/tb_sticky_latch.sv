// tb_sticky_latch: random flag pulses; the output must be the OR of all
// pulses seen since the last reset, one clock late.
module tb_sticky_latch;
  logic clk = 0, rst = 1;
  logic [11:0] d = '0, q, model = '0;
  int checks = 0, failures = 0;

  sticky_latch #(.W(12)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 400; t++) begin
      if (t == 200) begin
        rst = 1; @(posedge clk); #1 rst = 0; model = '0;
        checks++; if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
      end
      d = ($urandom_range(0, 15) == 0) ? 12'(1 << $urandom_range(0, 11)) : '0;
      @(posedge clk);
      model |= d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL t=%0d q=%h exp=%h", t, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
