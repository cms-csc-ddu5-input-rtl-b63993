// tb_fmm_status: NEARFULL follows its input one clock late; the three
// error bits latch on a single pulse and clear only on reset.
module tb_fmm_status;
  logic clk = 0, rst = 1, nearfull = 0, warn = 0, err = 0, crit = 0;
  logic [3:0] fmm, model;
  int checks = 0, failures = 0;

  fmm_status dut (.clk, .rst, .nearfull, .warn, .err, .crit, .fmm);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    model = '0;
    for (int t = 0; t < 600; t++) begin
      if (t == 300) begin
        rst = 1; @(posedge clk); #1 rst = 0; model = '0;
      end
      nearfull = $urandom_range(0, 3) == 0;
      warn = $urandom_range(0, 60) == 0;
      err  = $urandom_range(0, 90) == 0;
      crit = $urandom_range(0, 150) == 0;
      @(posedge clk);
      model = {model[3] | crit, model[2] | err, model[1] | warn, nearfull};
      #1;
      checks++;
      if (fmm !== model) begin failures++; $display("FAIL t=%0d fmm=%b exp=%b", t, fmm, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
