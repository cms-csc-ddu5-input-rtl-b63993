// tb_fiber_led: FOK LED lit for a ready link, blinking for a present but
// not ready link, dark without a link; DAV LED lit during data and for the
// hold time after it.  Small divider and hold values keep the run short.
module tb_fiber_led;
  localparam int NF = 3, DIV = 4, BB = 2, HOLD = 5;
  logic clk = 0, rst = 1;
  logic [NF-1:0] present, ready, dav, fok_led, dav_led;
  logic slow_tick;
  int checks = 0, failures = 0;
  int ticks = 0, on_cnt = 0, off_cnt = 0, lit_after = 0;

  fiber_led #(.NFIB(NF), .SLOW_DIV(DIV), .BLINK_BIT(BB), .DAV_HOLD(HOLD)) dut (
    .clk, .rst, .present, .ready, .dav, .fok_led, .dav_led, .slow_tick);

  always #5 clk = ~clk;

  initial begin
    present = 3'b011; ready = 3'b001; dav = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk); #1;
      if (t > 2) begin
        checks++;
        if (fok_led[0] !== 1'b1 || fok_led[2] !== 1'b0) begin
          failures++; $display("FAIL t=%0d fok=%b", t, fok_led);
        end
        if (fok_led[1]) on_cnt++; else off_cnt++;
      end
      if (slow_tick) ticks++;
    end
    // blink period: 2^(BB+1) slow ticks, half on, half off
    checks++;
    if (on_cnt < 150 || off_cnt < 150) begin failures++; $display("FAIL blink on=%0d off=%0d", on_cnt, off_cnt); end
    checks++;
    if (ticks != 100) begin failures++; $display("FAIL slow ticks=%0d exp 100", ticks); end
    // DAV: one pulse, LED stays lit about HOLD slow ticks (HOLD*DIV clocks)
    dav = 3'b100; @(posedge clk); #1 dav = '0;
    @(posedge clk); #1;
    for (int t = 0; t < 60; t++) begin
      if (dav_led[2]) lit_after++;
      @(posedge clk); #1;
    end
    checks++;
    if (lit_after < (HOLD - 1) * DIV || lit_after > (HOLD + 1) * DIV) begin
      failures++; $display("FAIL dav hold %0d clocks", lit_after);
    end
    checks++;
    if (dav_led[2] !== 1'b0 || dav_led[1:0] !== 2'b00) begin failures++; $display("FAIL dav still lit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
