// tb_mem_ctrl: four fibers write numbered words into the FIFOs the
// controller assigns and a reader drains each fiber through its read
// pointer.  Behavioural FIFOs (12 words, almost full at 5) stand in for the
// pool.  Checks: the first FIFOs come from the searches in both directions
// (fiber 0 lowest index, others highest), every fiber's words come back
// complete and in order across FIFO changes, the free count and minimum
// match the FIFOs in use, the nearly-full flag, and exhaustion is reported
// as starved.  Run with a 6-FIFO pool so that it runs out.
module tb_mem_ctrl;
  localparam int NF = 4, NP = 6, IW = $clog2(NP), CW = $clog2(NP + 1);
  localparam int CAP = 12, PAF = 5;   // almost full 7 words before full, as in the design
  logic clk = 0, rst = 1;
  logic [NP-1:0] fifo_paf, fifo_zero, in_use;
  logic [IW-1:0] wr_sel [NF];
  logic [IW-1:0] rd_sel [NF];
  logic [NF-1:0] wr_ok, rd_ok, starved;
  logic [CW-1:0] free_cnt, min_free;
  logic mem_full, free_err;
  int q [NP][$];
  int wseq [NF], rseq [NF];
  int checks = 0, failures = 0, n_starved = 0, n_switch = 0, minseen;
  bit heavy;
  bit [NF-1:0] was_starved = '0;   // starved since its last FIFO change

  mem_ctrl #(.NFIB(NF), .NFIFO(NP)) dut (.clk, .rst, .fifo_paf, .fifo_zero, .wr_sel, .wr_ok,
    .rd_sel, .rd_ok, .starved, .free_cnt, .min_free, .mem_full, .free_err, .in_use);

  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < NP; i++) begin
      fifo_zero[i] = (q[i].size() == 0);
      fifo_paf[i]  = (q[i].size() >= PAF);
    end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int f = 0; f < NF; f++) begin wseq[f] = 0; rseq[f] = 0; end
    minseen = NP;
    repeat (2) @(posedge clk); #1 rst = 0;
    repeat (NF) @(posedge clk);
    #1;
    check(wr_ok == '1 && rd_ok == '1, "all fibers assigned after 4 clocks");
    check(wr_sel[0] == 0, $sformatf("fiber 0 got %0d, expected 0 (up-search)", wr_sel[0]));
    for (int f = 1; f < NF; f++)
      check(wr_sel[f] == IW'(NP - f), $sformatf("fiber %0d got %0d, expected %0d (down-search)", f, wr_sel[f], NP - f));
    for (int t = 0; t < 6000; t++) begin
      int     rf;
      logic [IW-1:0] old_sel [NF];
      heavy = (t % 2000) < 700;          // phases of heavy writing exhaust the pool
      // --- sample and check before the edge
      #1;
      check(int'(free_cnt) == NP - $countones(in_use), "free count vs FIFOs in use");
      check(mem_full == (free_cnt <= 1), "mem_full");
      check(!free_err, "free-count error flagged");
      if (int'(free_cnt) < minseen) minseen = int'(free_cnt);
      check(int'(min_free) == minseen, "min_free");
      was_starved |= starved;
      if (|starved) begin
        n_starved++;
        check(free_cnt == 0, "starved with free FIFOs");
      end
      for (int f = 0; f < NF; f++) old_sel[f] = wr_sel[f];
      // writes
      for (int f = 0; f < NF; f++)
        if (wr_ok[f] && $urandom_range(0, 99) < (heavy ? 60 : 15)) begin
          if (q[wr_sel[f]].size() < CAP) begin
            q[wr_sel[f]].push_back(f * 100000 + wseq[f]);
            wseq[f]++;
          end else begin
            check(was_starved[f], $sformatf("fiber %0d overflowed without being starved", f));
          end
        end
      // one read per clock, random fiber
      rf = $urandom_range(0, NF - 1);
      if (rd_ok[rf] && q[rd_sel[rf]].size() > 0 && $urandom_range(0, 99) < (heavy ? 30 : 90)) begin
        automatic int v = q[rd_sel[rf]].pop_front();
        check(v == rf * 100000 + rseq[rf], $sformatf("fiber %0d read %0d expected %0d", rf, v, rf * 100000 + rseq[rf]));
        rseq[rf]++;
      end
      @(posedge clk);
      #1;
      for (int f = 0; f < NF; f++) if (wr_sel[f] != old_sel[f]) begin
        n_switch++;
        was_starved[f] = 1'b0;
      end
    end
    // drain everything
    repeat (400) begin
      for (int f = 0; f < NF; f++)
        if (rd_ok[f] && q[rd_sel[f]].size() > 0) begin
          automatic int v = q[rd_sel[f]].pop_front();
          check(v == f * 100000 + rseq[f], "drain order");
          rseq[f]++;
          break;
        end
      @(posedge clk); #1;
    end
    for (int f = 0; f < NF; f++) check(rseq[f] == wseq[f], $sformatf("fiber %0d read %0d of %0d", f, rseq[f], wseq[f]));
    check(int'(free_cnt) == NP - NF, $sformatf("free after drain %0d", free_cnt));
    check(n_starved > 0, "pool never ran out");
    check(n_switch > 20, $sformatf("only %0d FIFO changes", n_switch));
    $display("switches=%0d starved_cycles=%0d min_free=%0d", n_switch, n_starved, min_free);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
