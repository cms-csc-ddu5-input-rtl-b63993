// tb_rd_ctrl: behavioural fiber FIFOs feed the read controller; each L1A
// must produce header, the live fibers' words in fiber order and a
// TR-marked last word, with the 24-bit event number in the header.  Cases:
// normal events, a fiber without data (start timeout), a fiber that stops
// mid-event (end timeout), an event with no data at all (HDR+TR header),
// a burst of L1As that fills the event buffer (almost full, full, lost),
// random external almost-full stalls, and a read rate of one word per clock.
// The empty flag of the event buffer is checked every clock against a
// count of accepted L1As minus closed events.
module tb_rd_ctrl;
  import in5_pkg::*;
  localparam int NF = 4, STO = 20, ETO = 40, AF = 3, FULL = 4;
  logic clk = 0, rst = 1, l1a = 0, ext_paf = 0;
  logic [NF-1:0] live = 4'b1011, f_empty, f_rd, start_to, end_to;
  logic [35:0] f_dout [NF];
  logic owen, l1a_af, l1a_full, l1a_empty, l1a_lost, busy, ren_mt_err;
  logic [35:0] odout;
  logic [23:0] l1a_num;
  logic [35:0] fq [NF][$];
  logic [35:0] exp_q [$];
  int checks = 0, failures = 0, n_out = 0, n_af = 0, n_full = 0, n_stall = 0;
  int evnum = 1;
  bit paf_rand = 0;

  rd_ctrl #(.NFIB(NF), .START_TO(STO), .END_TO(ETO), .L1A_AF(AF), .L1A_FULL(FULL)) dut (
    .clk, .rst, .l1a, .live, .f_empty, .f_dout, .f_rd, .ext_paf, .owen, .odout,
    .l1a_num, .l1a_af, .l1a_full, .l1a_empty, .l1a_lost, .start_to, .end_to, .ren_mt_err, .busy);

  always #5 clk = ~clk;

  always_comb
    for (int f = 0; f < NF; f++) begin
      f_empty[f] = (fq[f].size() == 0);
      f_dout[f]  = f_empty[f] ? '0 : fq[f][0];
    end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    for (int f = 0; f < NF; f++) if (f_rd[f]) begin
      check(!f_empty[f], "read from empty fiber FIFO");
      check(!ext_paf, "read while external FIFO almost full");
      if (fq[f].size() > 0) void'(fq[f].pop_front());
    end
    if (owen) begin
      n_out++;
      check(exp_q.size() > 0, "unexpected output word");
      if (exp_q.size() > 0) begin
        check(odout == exp_q[0], $sformatf("out %h expected %h", odout, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
    if (l1a_af) n_af++;
    if (l1a_full) n_full++;
    if (ext_paf && busy) n_stall++;
    if (paf_rand) ext_paf <= ($urandom_range(0, 99) < 20);
  end

  // Pending-event model for l1a_empty: +1 for each L1A taken while not
  // full, -1 for each event's closing word (TR or HDR+TR, bit 35 set).
  int m_pend = 0;
  bit acc = 0;
  always @(posedge clk) acc <= l1a && !l1a_full && !rst;
  always @(negedge clk) if (rst) m_pend = 0; else begin
    m_pend += int'(acc) - int'(owen && odout[35]);
    check(l1a_empty == (m_pend == 0), $sformatf("l1a_empty %b with %0d pending", l1a_empty, m_pend));
    check(!ren_mt_err, "read with no pending event flagged");
  end

  function automatic logic [35:0] hdr(int num, frame_e fr);
    return {fr, 8'h00, 8'(num >> 16), 2'b00, 16'(num)};
  endfunction

  // Load one fiber's event of nrows words (LAST on the next-to-last row,
  // or none when cut) and append the expected output.
  task automatic load(int f, int nrows, bit cut, ref logic [35:0] words [$]);
    for (int r = 0; r < nrows; r++) begin
      logic [35:0] w = {$urandom, 4'($urandom)};
      w[17] = 1'b0; w[35] = 1'b0;
      if (!cut && r == nrows - 2) begin
        if (f % 2 == 0) w[17] = 1'b1; else w[35] = 1'b1;
      end
      fq[f].push_back(w);
      words.push_back(w);
    end
  endtask

  // Expected output of one event from the data words in fiber order.
  task automatic expect_event(ref logic [35:0] words [$]);
    if (words.size() == 0) exp_q.push_back(hdr(evnum, FR_EMPTY));
    else begin
      exp_q.push_back(hdr(evnum, FR_HDR));
      for (int i = 0; i < words.size(); i++)
        exp_q.push_back({(i == words.size() - 1) ? FR_LAST : FR_DATA, words[i][33:0]});
    end
    evnum++;
  endtask

  task automatic trigger();
    l1a = 1; @(posedge clk); #1 l1a = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    @(posedge clk); #1;
    while (busy || exp_q.size() != 0) begin @(posedge clk); #1; n++; if (n > 5000) break; end
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [35:0] w [$];
    int t0, t1;
    repeat (2) @(posedge clk); #1 rst = 0;

    // e1: normal, data ready; check the rate
    w.delete(); load(0, 6, 0, w); load(1, 4, 0, w); load(3, 8, 0, w); expect_event(w);
    trigger();
    t0 = int'($time);
    wait_idle();
    check(start_to == 0 && end_to == 0, "no timeouts in a normal event");

    // e2: fiber 3 sends nothing -> start timeout, event still complete
    w.delete(); load(0, 4, 0, w); load(1, 2, 0, w); expect_event(w);
    trigger(); wait_idle();
    check(start_to == 4'b1000 && end_to == 0, $sformatf("start timeout flags %b", start_to));

    // e3: fiber 1 stops after 3 words -> end timeout
    w.delete(); load(0, 2, 0, w); load(1, 3, 1, w); load(3, 2, 0, w); expect_event(w);
    trigger(); wait_idle();
    check(end_to == 4'b0010, $sformatf("end timeout flags %b", end_to));

    // e4: no fiber has data -> empty event
    w.delete(); expect_event(w);
    trigger(); wait_idle();

    // burst: 5 L1As back to back, 4 fit in the buffer, data for 4 events
    paf_rand = 1;
    for (int e = 0; e < 4; e++) begin
      w.delete();
      load(0, 2 + 2 * e, 0, w); load(1, 2, 0, w); load(3, 4, 0, w);
      expect_event(w);
    end
    rst = 0;
    for (int k = 0; k < 5; k++) trigger();
    wait_idle();
    paf_rand = 0; ext_paf = 0;
    check(l1a_lost, "fifth L1A not reported lost");
    check(n_af > 0 && n_full > 0, $sformatf("buffer flags af=%0d full=%0d", n_af, n_full));
    check(n_stall > 0, "never stalled by external almost full");
    check(exp_q.size() == 0, $sformatf("%0d expected words missing", exp_q.size()));
    check(l1a_num == 24'(evnum), $sformatf("event number %0d expected %0d", l1a_num, evnum));

    // rate: 40 words ready in one fiber -> about one word per clock
    w.delete(); load(0, 40, 0, w); expect_event(w);
    trigger();
    @(posedge clk); while (!owen) @(posedge clk);
    t0 = int'($time);
    // the last word waits in the holding register until the idle fibers
    // have timed out; the other 40 must stream at one per clock
    while (exp_q.size() > 1) @(posedge clk);
    t1 = int'($time);
    check((t1 - t0) / 10 <= 41, $sformatf("40 words took %0d clocks", (t1 - t0) / 10));
    wait_idle();
    $display("out=%0d af=%0d full=%0d stalls=%0d", n_out, n_af, n_full, n_stall);
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
