// tb_fiber_ok_latch: random link-OK patterns against a reference model.
// After each reset every LFOK bit must start set, drop one clock after its
// link goes low and stay low until the next reset; fibers absent at reset
// drop out without a change flag, and after the settling window every rise
// or fall of a link against its LFOK bit must set that fiber's change flag.
module tb_fiber_ok_latch;
  localparam int N = 8, SETTLE = 9;
  logic clk = 0, rst = 1;
  logic [N-1:0] fiber_ok = '0, lfok, changed;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0;

  fiber_ok_latch #(.NFIB(N), .SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [N-1:0] m_lfok, m_chg;
    int t;
    for (int r = 0; r < 20; r++) begin
      // reset with a random set of connected fibers
      fiber_ok = N'($urandom);
      rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      m_lfok = '1; m_chg = '0; t = 0;
      check(lfok == '1 && changed == '0, "reset state");
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        // reference: evaluate this clock's update with the current inputs
        if (t >= SETTLE) begin
          if (|(~m_lfok & fiber_ok)) n_rise++;
          if (|(m_lfok & ~fiber_ok)) n_fall++;
          m_chg = m_chg | (m_lfok ^ fiber_ok);
        end
        m_lfok = m_lfok & fiber_ok;
        t++;
        @(posedge clk); #1;
        check(lfok == m_lfok, $sformatf("lfok %b expected %b", lfok, m_lfok));
        check(changed == m_chg, $sformatf("changed %b expected %b", changed, m_chg));
        // links mostly steady, sometimes one flips
        if ($urandom_range(0, 99) < 8) fiber_ok[$urandom_range(0, N - 1)] ^= 1'b1;
      end
    end
    check(n_rise > 0 && n_fall > 0, $sformatf("link rises %0d, falls %0d", n_rise, n_fall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
