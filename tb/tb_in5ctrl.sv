// tb_in5ctrl: end-to-end test of the input control FPGA at its default
// sizes (22 FIFOs of 1024 words per group, 128-clock start timeout, event
// buffer marks 7680/8192).
//
// Phase A sends DMB events on the fibers: fiber 0 carries a five-CFEB event
// (1004 64-bit words, more than one FIFO holds, so its data continue in a
// second pool FIFO), fiber 6 is live but silent (start timeouts), fiber 5
// loses a word before its trailer (padding with FILL), fiber 3 has a damaged
// E-code (FMM warning).  Every output word of both groups is compared with
// words built here from the sent halves.  The JTAG chain then reads the
// fiber-OK register, group 0's event number, the free and minimum free FIFO
// counts, the write FIFO of each fiber, the empty and almost-full lists and
// both halves of the status word.  Phase B fires 11000 L1As
// with no live fiber: the event buffer passes almost full and full, L1As are
// lost, every accepted L1A gives a header-only event.  Phase C uses the fake
// L1A switch after a board reset (the links lost in phase B stay out until
// then): an event per fiber is read out without any L1A.  Random
// external almost-full stalls run throughout.  Each mechanism is counted and
// one that never happened is a failure.
module tb_in5ctrl;
  import in5_pkg::*;
  localparam int NF = 8;

  logic clk = 0, rst = 1;
  logic [15:0] rx_data [NF];
  logic [NF-1:0] rx_isk = '1, rx_err = '0, fiber_present = '1, fiber_ok = '0;
  logic l1a = 0, bc0 = 0;
  logic [1:0] ext_paf = '0, ext_ff = '0, owen;
  logic [35:0] odout [2];
  logic [3:0] sw_mode = 0;
  logic sw_fake_l1a = 0, sw_show_stat = 0;
  logic [NF-1:0] fok_led, dav_led;
  logic [7:0] diag_led;
  logic [31:0] la, status;
  logic [3:0] fmm;
  logic [11:0] lffull, bxn;
  logic [21:0] mem_in_use [2];
  logic drclk = 0, jrst = 1, sel2 = 0, shift = 0, tdi = 0, tdo;
  logic [4:0] jtag_op = 0;

  in5ctrl dut (.*);

  always #5 clk = ~clk;
  always #7 drclk = ~drclk;

  int checks = 0, failures = 0;
  logic [35:0] exp_q [2][$];
  logic [15:0] txq [NF][$];
  int evnum [2] = '{1, 1};
  bit paf_rand = 1;
  bit phase_b = 0;     // header-only events, checked by their number
  // mechanism counters
  int n_switch = 0, n_fill = 0, n_start_to = 0, n_stall = 0, n_af = 0, n_full = 0,
      n_lost = 0, n_warn = 0, n_empty_evt = 0, n_fake = 0, n_jtag = 0, n_words = 0,
      n_kill = 0;
  logic [4:0] prev_sel;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ---------------------------------------------------------- fiber drivers
  // Idle gaps are inserted at random, but never inside the run of trailer
  // E-codes: a DMB sends its four E-codes back to back.
  for (genvar f = 0; f < NF; f++) begin : g_drv
    bit last_e = 0;
    always @(posedge clk) begin
      if (txq[f].size() > 0 && (($urandom_range(0, 99) < 97) || (last_e && is_ecode(txq[f][0])))) begin
        last_e     <= is_ecode(txq[f][0]);
        rx_data[f] <= txq[f].pop_front();
        rx_isk[f]  <= 1'b0;
      end else begin
        last_e     <= 1'b0;
        rx_data[f] <= IDLE_WORD;
        rx_isk[f]  <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------- output check
  always @(posedge clk) if (!rst) begin
    for (int g = 0; g < 2; g++) if (owen[g] && phase_b) begin
      n_words++;
      check(odout[g] == {FR_EMPTY, 8'h00, 8'(evnum[g] >> 16), 2'b00, 16'(evnum[g])},
            $sformatf("group %0d: header-only event %h, expected number %0d", g, odout[g], evnum[g]));
      evnum[g]++;
      n_empty_evt++;
    end else if (owen[g]) begin
      n_words++;
      check(exp_q[g].size() > 0, $sformatf("group %0d: unexpected word %h", g, odout[g]));
      if (exp_q[g].size() > 0) begin
        check(odout[g] == exp_q[g][0], $sformatf("group %0d: %h expected %h", g, odout[g], exp_q[g][0]));
        void'(exp_q[g].pop_front());
      end
      if (odout[g][33:18] == FILL_WORD) n_fill++;
      if (odout[g][35:34] == FR_EMPTY) n_empty_evt++;
    end
    if (dut.g_grp[0].u_grp.wr_sel[0] != prev_sel) n_switch++;
    prev_sel <= dut.g_grp[0].u_grp.wr_sel[0];
    if (|ext_paf && |{dut.g_grp[0].u_grp.busy, dut.g_grp[1].u_grp.busy}) n_stall++;
    if (dut.l1a_af[0]) n_af++;
    if (dut.l1a_full[0]) n_full++;
    if (paf_rand) ext_paf <= {($urandom_range(0, 99) < 10), ($urandom_range(0, 99) < 10)};
    else ext_paf <= '0;
  end

  // ---------------------------------------------------------- stimulus
  function automatic logic [15:0] dword();
    return {4'(1 + $urandom_range(0, 12)), 12'($urandom)};
  endfunction

  // Queue a DMB event of nw 64-bit words on fiber f; kind 0 normal,
  // 1 one word lost before the trailer, 2 damaged first E-code.
  task automatic dmb_event(int f, int nw, int kind);
    logic [15:0] h [$];
    int g = f / 4, n;
    for (int i = 0; i < 4 * (nw - 1); i++) h.push_back(dword());
    if (kind == 1) void'(h.pop_back());
    for (int i = 0; i < 4; i++) h.push_back(16'hE000 | 16'(i));
    if (kind == 2) h[h.size() - 4] = 16'h7000;
    foreach (h[i]) txq[f].push_back(h[i]);
    // expected words: pairs of halves; LAST in the first word of the last
    // 64-bit group (its flag bit 35 is replaced by the framing bits)
    if (kind == 1) h.push_back(FILL_WORD);
    n = h.size();
    for (int r = 0; r < n / 2; r++) begin
      logic llo = (kind == 1) && (r == n / 2 - 2);
      exp_q[g].push_back({FR_DATA, h[2 * r + 1], llo, 1'b0, h[2 * r]});
    end
  endtask

  // Frame the expected words queued since 'start' as one event of group g.
  task automatic frame(int g, int start);
    logic [35:0] hw = {FR_HDR, 8'h00, 8'(evnum[g] >> 16), 2'b00, 16'(evnum[g])};
    if (exp_q[g].size() == start) begin
      hw[35:34] = FR_EMPTY;
      exp_q[g].push_back(hw);
    end else begin
      exp_q[g].insert(start, hw);
      exp_q[g][exp_q[g].size() - 1][35:34] = FR_LAST;
    end
    evnum[g]++;
  endtask

  task automatic wait_drain(int limit);
    int n = 0;
    while ((exp_q[0].size() + exp_q[1].size() != 0 || dut.g_grp[0].u_grp.busy ||
            dut.g_grp[1].u_grp.busy || dut.g_grp[0].u_grp.u_rd.pend != 0 ||
            dut.g_grp[1].u_grp.u_rd.pend != 0) && n < limit) begin
      @(posedge clk); n++;
    end
    repeat (4) @(posedge clk);
  endtask

  task automatic jtag_read(logic [4:0] op, int w, output logic [31:0] v);
    @(negedge drclk);
    jtag_op = op; sel2 = 1; shift = 0;
    @(negedge drclk);            // capture edge passed
    shift = 1;
    v = '0;
    for (int i = 0; i < w; i++) begin
      v[i] = tdo;
      @(negedge drclk);
    end
    sel2 = 0; shift = 0;
  endtask

  initial begin
    int s0, s1, e0, e1;
    logic [31:0] jv;
    for (int f = 0; f < NF; f++) rx_data[f] = IDLE_WORD;
    prev_sel = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0; jrst = 0;
    fiber_ok = 8'hFF;
    repeat (20) @(posedge clk);
    check(status[23:16] == 8'hFF, "fiber OK in status");

    // ---------------- phase A: two data events
    s0 = exp_q[0].size(); s1 = exp_q[1].size();
    dmb_event(0, 1004, 0); dmb_event(1, 204, 0); dmb_event(2, 204, 0); dmb_event(3, 204, 0);
    dmb_event(4, 204, 0); dmb_event(5, 204, 0); dmb_event(7, 204, 0);
    frame(0, s0); frame(1, s1);
    // the trigger comes late, so fiber 0 fills its first FIFO and goes on
    // in a second one
    while (txq[0].size() > 0) @(posedge clk);
    @(negedge clk) l1a = 1; @(negedge clk) l1a = 0;
    s0 = exp_q[0].size(); s1 = exp_q[1].size();
    dmb_event(0, 12, 0); dmb_event(1, 8, 0); dmb_event(2, 8, 0); dmb_event(3, 8, 2);
    dmb_event(4, 8, 0); dmb_event(5, 9, 1); dmb_event(7, 8, 0);
    frame(0, s0); frame(1, s1);
    @(negedge clk) l1a = 1; @(negedge clk) l1a = 0;
    wait_drain(40000);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0,
          $sformatf("phase A words missing: %0d/%0d", exp_q[0].size(), exp_q[1].size()));
    n_start_to = $countones(dut.start_to);
    check(dut.start_to == 8'b0100_0000, $sformatf("start timeouts %b", dut.start_to));
    if (fmm[1]) n_warn++;
    check(fmm[2] && !fmm[3], $sformatf("fmm %b: timeout error, no data loss", fmm));
    check(status[6] && status[27], "status: fiber 6 error, fiber 3 E-code");

    // JTAG read-out
    jtag_read(OP_FOK, 8, jv);
    check(jv[7:0] == 8'hFF, $sformatf("JTAG FOK %h", jv[7:0])); n_jtag++;
    jtag_read(OP_L1A0, 24, jv);
    check(jv[23:0] == 24'd3, $sformatf("JTAG event number %0d", jv[23:0])); n_jtag++;
    jtag_read(OP_MEMAVL, 10, jv);
    check(jv[4:0] == 5'd18 && jv[9:5] == 5'd18, $sformatf("JTAG free FIFOs %h", jv[9:0])); n_jtag++;
    jtag_read(OP_MEMMIN, 10, jv);
    check(jv[4:0] == 5'd17, $sformatf("JTAG minimum free FIFOs %0d", jv[4:0])); n_jtag++;
    // write FIFOs: fibers 0 and 4 took FIFO 0 first (up-search) and fiber 0
    // went on to FIFO 1; the others took 21, 20, 19 (down-search)
    jtag_read(OP_WMEM, 10, jv);
    check(jv[9:0] == {5'd21, 5'd1}, $sformatf("JTAG write FIFOs 1&0: %0d %0d", jv[9:5], jv[4:0])); n_jtag++;
    jtag_read(OP_WMEM + 5'd2, 10, jv);
    check(jv[9:0] == {5'd21, 5'd0}, $sformatf("JTAG write FIFOs 5&4: %0d %0d", jv[9:5], jv[4:0])); n_jtag++;
    jtag_read(OP_WMEM + 5'd3, 10, jv);
    check(jv[9:0] == {5'd19, 5'd20}, $sformatf("JTAG write FIFOs 7&6: %0d %0d", jv[9:5], jv[4:0])); n_jtag++;
    jtag_read(OP_EMPTY, 10, jv);
    check(jv[9:0] == 10'h3FF, $sformatf("JTAG empty flags %h", jv[9:0])); n_jtag++;
    jtag_read(OP_AFULL, 6, jv);
    check(jv[3:0] == 4'h0, $sformatf("JTAG almost-full flags %h", jv[5:0])); n_jtag++;
    jtag_read(OP_STAT_HI, 16, jv);
    check(jv[15:0] == status[31:16], $sformatf("JTAG status high %h", jv[15:0])); n_jtag++;
    jtag_read(OP_STAT_LO, 16, jv);
    // bit 15 follows the random external almost-full inputs
    check(jv[14:0] == status[14:0], $sformatf("JTAG status low %h", jv[15:0])); n_jtag++;
    sw_show_stat = 1; #1;
    check(la == status && diag_led == ~8'd25, "show-status mode");
    sw_show_stat = 0;

    // ---------------- phase B: L1A burst with no live fiber
    fiber_ok = 8'h00;
    repeat (5) @(posedge clk);
    phase_b = 1;
    e0 = evnum[0]; e1 = evnum[1];
    for (int k = 0; k < 11000; k++) begin
      @(negedge clk) l1a = 1;
    end
    @(negedge clk) l1a = 0;
    begin
      wait_drain(200000);
      n_lost = 11000 - (evnum[0] - e0);
      // each group accepts at least the 8192 its buffer holds
      check(evnum[0] - e0 > 8192 && evnum[0] - e0 < 11000 && evnum[1] - e1 > 8192 && evnum[1] - e1 < 11000,
            $sformatf("accepted %0d/%0d of 11000 L1As", evnum[0] - e0, evnum[1] - e1));
    end
    phase_b = 0;
    check(dut.l1a_lost == 2'b11, "L1As lost while full");
    check(lffull[9:8] == 2'b11, "L1A buffer full latched");
    check(fmm[3], "critical error after lost L1As");

    // A link that failed stays out until reset, and the change is an error.
    check(status[23:16] == 8'h00 && status[7:0] == 8'hFF && fmm[2], "lost links latched out");
    fiber_ok = 8'b0011_0001;
    repeat (5) @(posedge clk);
    check(status[23:16] == 8'h00, "returning links stay out until reset");
    if (status[23:16] == 8'h00 && status[7:0] == 8'hFF) n_kill++;

    // ---------------- phase C: after a reset, fake L1A, data pass-through
    @(negedge clk) rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    evnum = '{1, 1};
    repeat (20) @(posedge clk);
    check(status[23:16] == 8'b0011_0001 && status[7:0] == 8'h00 && fmm == 4'b0000,
          $sformatf("after reset: status %h fmm %b", status, fmm));
    sw_fake_l1a = 1;
    repeat (5) @(posedge clk);
    s0 = exp_q[0].size(); s1 = exp_q[1].size();
    dmb_event(0, 6, 0); dmb_event(4, 6, 0); dmb_event(5, 6, 0);
    frame(0, s0); frame(1, s1);
    wait_drain(20000);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "phase C words missing");
    n_fake = int'(dut.g_grp[0].u_grp.l1a_num) - 1;

    // ---------------- mechanism coverage
    $display("words=%0d fifo_switch=%0d fill=%0d start_to=%0d stall=%0d af=%0d full=%0d lost=%0d warn=%0d empty_evt=%0d jtag=%0d fake=%0d kill=%0d",
             n_words, n_switch, n_fill, n_start_to, n_stall, n_af, n_full, n_lost, n_warn, n_empty_evt, n_jtag, n_fake, n_kill);
    check(n_switch >= 1, "FIFO chaining never happened");
    check(n_fill >= 1, "FILL padding never happened");
    check(n_start_to >= 1, "start timeout never happened");
    check(n_stall >= 1, "external almost-full stall never happened");
    check(n_af >= 1, "event buffer almost full never happened");
    check(n_full >= 1, "event buffer full never happened");
    check(n_lost >= 1, "L1A loss never happened");
    check(n_warn >= 1, "E-code warning never happened");
    check(n_empty_evt >= 1, "empty event never happened");
    check(n_jtag >= 1, "JTAG read-out never happened");
    check(n_fake >= 1, "fake L1A never happened");
    check(n_kill >= 1, "fiber link loss never latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
