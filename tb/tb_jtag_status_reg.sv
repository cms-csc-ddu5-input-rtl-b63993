// tb_jtag_status_reg: capture a random status word, shift it out LSB first
// while shifting a new pattern in, and check that a register without its
// enable does not move.
module tb_jtag_status_reg;
  localparam int W = 24;
  logic drclk = 0, rst = 1, dvcenb = 0, sel2 = 0, lshft = 0, tdi = 0;
  logic [W-1:0] status, inpat, got;
  logic tdo;
  int checks = 0, failures = 0;

  jtag_status_reg #(.W(W)) dut (.drclk, .rst, .dvcenb, .sel2, .lshft, .tdi, .status, .tdo);

  always #5 drclk = ~drclk;

  initial begin
    @(posedge drclk); #1 rst = 0;
    for (int k = 0; k < 20; k++) begin
      status = W'($urandom);
      inpat  = W'($urandom);
      dvcenb = 1; sel2 = 1; lshft = 0;
      @(posedge drclk); #1;          // capture
      lshft = 1;
      for (int i = 0; i < W; i++) begin
        got[i] = tdo;
        tdi = inpat[i];
        @(posedge drclk); #1;
      end
      checks++;
      if (got !== status) begin failures++; $display("FAIL shift-out %h exp %h", got, status); end
      // the shifted-in pattern must now come out again
      for (int i = 0; i < W; i++) begin
        got[i] = tdo;
        @(posedge drclk); #1;
      end
      checks++;
      if (got !== inpat) begin failures++; $display("FAIL shift-in %h exp %h", got, inpat); end
      // no movement without SEL2
      lshft = 0; sel2 = 0; status = ~status;
      begin
        automatic logic t0 = tdo;
        repeat (3) @(posedge drclk);
        #1;
        checks++;
        if (tdo !== t0) begin failures++; $display("FAIL moved while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge drclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
