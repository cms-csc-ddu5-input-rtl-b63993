// in5ctrl: input control FPGA of a CSC data concentrator (DDU) board.
//
// Eight optical fibers from chamber readout boards (DMBs) arrive here as
// 16-bit words from the transceivers.  Each fiber has an input unit that
// drops idles and receive-error words and aligns the stream into 36-bit
// memory words, padding each event to a 64-bit boundary and flagging its
// last word.  Fibers 0-3 and 4-7 form two read groups.  A group keeps a
// pool of 22 FIFOs of 1024 words that its fibers borrow on demand, and a
// read controller that, for each L1A, concatenates the group's fibers into
// one framed event (header, data, last-word marker) for an external FIFO.
//
// Around the data path: a 12-bit latch of full flags (fiber FIFOs 7-0, the
// two L1A buffers, the two external FIFOs), FMM condition bits, the
// fiber LEDs, the bunch-crossing counter, the mode switch block and JTAG
// read-out registers selected by a 5-bit opcode:
//   2  read group 0 event number (24)   3  status word (32)
//   6  fiber error flags (8)            7  fiber OK flags (8)
//   17 free FIFOs, groups 1 & 0 (10)    18 minimum free FIFOs, 1 & 0 (10)
//   4/5 status word low/high half (16)  13-16 write FIFOs of fibers 1&0 ..
//   20 almost-full flags (6)                  7&6 (2 x 5)
//   21 latched full flags (12)          25 empty flags (10)
//   26 read group 1 event number (24)
// Fibers are read while their latched fiber-OK bit (LFOK) is set: reset
// sets it, a lost link clears it until the next reset, and a link change
// after reset counts as a fiber error.  JTAG opcode 7 reads the raw link-OK
// inputs as a fiber check.
// Status word: 7-0 fiber errors (timeout, damaged trailer, link change),
// 8/9 L1A buffer almost full, 10/11 L1A buffer full, 12/13 pool nearly
// exhausted, 14 any latched full flag, 15 any external FIFO almost full,
// 23-16 latched fiber OK, 31-24 damaged E-code seen.
// FMM bits: near full from an L1A buffer past its almost-full mark or a
// nearly exhausted pool; warning from a damaged E-code word or a receive
// error on a live fiber; error from a start or end timeout, a fiber link
// change, a pool search that found no free FIFO, a pool free-count error or
// a fiber read with an empty event buffer; critical from data lost to a full fiber FIFO or an L1A lost to a
// full buffer.  The LED block's 2.5 MHz tick and the orbit counter's wrap
// pulse have no user in this FPGA yet and are left unconnected.
// The transceivers are outside; their words are ports.  One system clock
// (40 MHz) for the data path, the JTAG data-register clock drclk for the
// read-out shift registers.  Synchronous active-high reset of the data path.
module in5ctrl
  import in5_pkg::*;
#(
  parameter int unsigned NFIB     = 8,
  parameter int unsigned NFIFO    = NFIFO_DEF,
  parameter int unsigned DEPTH    = FIFO_DEPTH,
  parameter int unsigned START_TO = START_TIMEOUT_DEF,
  parameter int unsigned END_TO   = END_TIMEOUT_DEF,
  parameter int unsigned L1A_AF   = L1A_AF_DEF,
  parameter int unsigned L1A_FULL = L1A_FULL_DEF,
  parameter int unsigned FREEZE   = FREEZE_DEF,
  localparam int unsigned CW      = $clog2(NFIFO + 1),
  localparam int unsigned HALF    = NFIB / 2,
  localparam int unsigned IW      = $clog2(NFIFO)
) (
  input  logic            clk,
  input  logic            rst,
  // fiber receivers
  input  logic [15:0]     rx_data [NFIB],
  input  logic [NFIB-1:0] rx_isk,
  input  logic [NFIB-1:0] rx_err,
  input  logic [NFIB-1:0] fiber_present,
  input  logic [NFIB-1:0] fiber_ok,
  // trigger and external FIFOs
  input  logic            l1a,
  input  logic            bc0,
  input  logic [1:0]      ext_paf,
  input  logic [1:0]      ext_ff,
  output logic [1:0]      owen,
  output logic [35:0]     odout [2],
  // front panel
  input  logic [3:0]      sw_mode,
  input  logic            sw_fake_l1a,
  input  logic            sw_show_stat,
  output logic [NFIB-1:0] fok_led,
  output logic [NFIB-1:0] dav_led,
  output logic [7:0]      diag_led,
  output logic [31:0]     la,
  // monitoring
  output logic [3:0]      fmm,
  output logic [31:0]     status,
  output logic [11:0]     lffull,
  output logic [11:0]     bxn,
  output logic [NFIFO-1:0] mem_in_use [2],
  // JTAG user chain
  input  logic            drclk,
  input  logic            jrst,
  input  logic            sel2,
  input  logic            shift,
  input  logic            tdi,
  input  logic [4:0]      jtag_op,
  output logic            tdo
);
  // ---------------------------------------------------------------- inputs
  logic            iu_wen  [NFIB];
  logic [35:0]     iu_wdat [NFIB];
  logic [NFIB-1:0] evt_end, ecode_err, dav;

  for (genvar f = 0; f < NFIB; f++) begin : g_in
    in_unit #(.FREEZE(FREEZE)) u_in (
      .clk, .rst,
      .rx_data(rx_data[f]), .rx_isk(rx_isk[f]), .rx_err(rx_err[f]),
      .wen(iu_wen[f]), .wdata(iu_wdat[f]),
      .evt_end(evt_end[f]), .ecode_err(ecode_err[f]), .dav(dav[f])
    );
  end

  // Latched fiber OK: a fiber that lost its link stays out until reset.
  logic [NFIB-1:0] lfok, fok_chg;
  fiber_ok_latch #(.NFIB(NFIB), .SETTLE(FREEZE)) u_lfok (
    .clk, .rst, .fiber_ok, .lfok, .changed(fok_chg)
  );

  // ----------------------------------------------------------- read groups
  logic [1:0]      l1a_grp;
  logic [NFIB-1:0] fiber_full, start_to, end_to, starved;
  logic [23:0]     l1a_num [2];
  logic [1:0]      l1a_af, l1a_full, l1a_lost, mem_full, busy;
  logic [CW-1:0]   free_cnt [2];
  logic [CW-1:0]   min_free [2];
  logic [IW-1:0]   wr_fifo [NFIB];
  logic [NFIB-1:0] fib_empty;
  logic [1:0]      l1a_empty, free_err, ren_mt_err;

  for (genvar g = 0; g < 2; g++) begin : g_grp
    logic [HALF-1:0] wen_g;
    logic [35:0]     wdat_g [HALF];
    logic [IW-1:0]   wr_fifo_g [HALF];
    always_comb
      for (int f = 0; f < HALF; f++) begin
        wen_g[f]  = iu_wen[g * HALF + f];
        wdat_g[f] = iu_wdat[g * HALF + f];
        wr_fifo[g * HALF + f] = wr_fifo_g[f];
      end

    rd_group #(
      .NFIB(HALF), .NFIFO(NFIFO), .DEPTH(DEPTH),
      .START_TO(START_TO), .END_TO(END_TO),
      .L1A_AF(L1A_AF), .L1A_FULL(L1A_FULL)
    ) u_grp (
      .clk, .rst,
      .wen(wen_g), .wdata(wdat_g),
      .live(lfok[g * HALF +: HALF]),
      .l1a(l1a_grp[g]), .ext_paf(ext_paf[g]),
      .owen(owen[g]), .odout(odout[g]),
      .fiber_full(fiber_full[g * HALF +: HALF]),
      .l1a_num(l1a_num[g]), .l1a_af(l1a_af[g]), .l1a_full(l1a_full[g]),
      .l1a_lost(l1a_lost[g]),
      .start_to(start_to[g * HALF +: HALF]), .end_to(end_to[g * HALF +: HALF]),
      .free_cnt(free_cnt[g]), .min_free(min_free[g]), .mem_full(mem_full[g]),
      .starved(starved[g * HALF +: HALF]), .mem_in_use(mem_in_use[g]),
      .wr_fifo(wr_fifo_g), .fib_empty(fib_empty[g * HALF +: HALF]),
      .l1a_empty(l1a_empty[g]), .free_err(free_err[g]),
      .ren_mt_err(ren_mt_err[g]), .busy(busy[g])
    );
  end

  // ------------------------------------------------------------ monitoring
  logic [NFIB-1:0] ferr, ecode_seen;

  sticky_latch #(.W(12)) u_ffull (
    .clk, .rst, .d({ext_ff, l1a_full, fiber_full}), .q(lffull)
  );
  sticky_latch #(.W(2 * NFIB)) u_ferr (
    .clk, .rst, .d({ecode_err, start_to | end_to | ecode_err | fok_chg}), .q({ecode_seen, ferr})
  );

  always_comb
    status = {ecode_seen, lfok, |ext_paf, |lffull, mem_full, l1a_full, l1a_af, ferr};

  fmm_status u_fmm (
    .clk, .rst,
    .nearfull(|{l1a_af, mem_full}),
    .warn(|{ecode_err, rx_err & lfok}),
    .err(|{start_to, end_to, fok_chg, starved, free_err, ren_mt_err}),
    .crit(|{fiber_full, l1a_lost}),
    .fmm
  );

  logic slow_tick;
  fiber_led #(.NFIB(NFIB)) u_led (
    .clk, .rst, .present(fiber_present), .ready(fiber_ok), .dav,
    .fok_led, .dav_led, .slow_tick
  );

  logic bx_wrap;
  bxn_counter u_bxn (.clk, .rst, .bc0, .bxn, .wrap(bx_wrap));

  logic [31:0] diag [4];
  always_comb begin
    diag[0] = {busy, 6'(free_cnt[1]), 6'(free_cnt[0]), bxn, owen, ext_paf, ext_ff};
    diag[1] = {8'h00, l1a_num[0]};
    diag[2] = {8'h00, l1a_num[1]};
    diag[3] = {4'h0, 12'(lffull), 4'(fmm), 12'(starved)};
  end

  mode_ctrl #(.NFIB(NFIB)) u_mode (
    .clk, .rst, .sw_mode, .sw_fake_l1a, .sw_show_stat,
    .l1a_in(l1a), .live(lfok), .evt_end, .status, .diag,
    .l1a_grp, .la, .led(diag_led)
  );

  // ------------------------------------------------------------------ JTAG
  logic [31:0] dvcenb, tdo_bus;
  logic tdo_l1a0, tdo_stat, tdo_ferr, tdo_fok, tdo_mav, tdo_mmin, tdo_ff, tdo_l1a1;
  logic tdo_slo, tdo_shi, tdo_af, tdo_mt;
  logic [NFIB/2-1:0] tdo_wmem;

  jtag_decode u_jdec (.op(jtag_op), .en(1'b1), .tdo_bus, .dvcenb, .tdo);

  always_comb begin
    tdo_bus = '0;
    tdo_bus[OP_L1A0]   = tdo_l1a0;
    tdo_bus[OP_STATUS] = tdo_stat;
    tdo_bus[OP_FERR]   = tdo_ferr;
    tdo_bus[OP_FOK]    = tdo_fok;
    tdo_bus[OP_MEMAVL] = tdo_mav;
    tdo_bus[OP_MEMMIN] = tdo_mmin;
    tdo_bus[OP_FFULL]  = tdo_ff;
    tdo_bus[OP_L1A1]   = tdo_l1a1;
    tdo_bus[OP_STAT_LO] = tdo_slo;
    tdo_bus[OP_STAT_HI] = tdo_shi;
    tdo_bus[OP_AFULL]  = tdo_af;
    tdo_bus[OP_EMPTY]  = tdo_mt;
    for (int k = 0; k < NFIB / 2; k++) tdo_bus[OP_WMEM + 5'(k)] = tdo_wmem[k];
  end


  jtag_status_reg #(.W(24)) u_j_l1a0 (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_L1A0]), .sel2,
    .lshft(shift), .tdi, .status(l1a_num[0]), .tdo(tdo_l1a0));
  jtag_status_reg #(.W(32)) u_j_stat (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_STATUS]), .sel2,
    .lshft(shift), .tdi, .status(status), .tdo(tdo_stat));
  jtag_status_reg #(.W(NFIB)) u_j_ferr (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_FERR]), .sel2,
    .lshft(shift), .tdi, .status(ferr), .tdo(tdo_ferr));
  jtag_status_reg #(.W(NFIB)) u_j_fok (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_FOK]), .sel2,
    .lshft(shift), .tdi, .status(fiber_ok), .tdo(tdo_fok));
  jtag_status_reg #(.W(2 * CW)) u_j_mav (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_MEMAVL]), .sel2,
    .lshft(shift), .tdi, .status({free_cnt[1], free_cnt[0]}), .tdo(tdo_mav));
  jtag_status_reg #(.W(2 * CW)) u_j_mmin (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_MEMMIN]), .sel2,
    .lshft(shift), .tdi, .status({min_free[1], min_free[0]}), .tdo(tdo_mmin));
  jtag_status_reg #(.W(12)) u_j_ff (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_FFULL]), .sel2,
    .lshft(shift), .tdi, .status(lffull), .tdo(tdo_ff));
  jtag_status_reg #(.W(24)) u_j_l1a1 (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_L1A1]), .sel2,
    .lshft(shift), .tdi, .status(l1a_num[1]), .tdo(tdo_l1a1));
  jtag_status_reg #(.W(16)) u_j_slo (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_STAT_LO]), .sel2,
    .lshft(shift), .tdi, .status(status[15:0]), .tdo(tdo_slo));
  jtag_status_reg #(.W(16)) u_j_shi (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_STAT_HI]), .sel2,
    .lshft(shift), .tdi, .status(status[31:16]), .tdo(tdo_shi));
  // almost-full list: 0/1 pool of group 0/1, 2/3 event buffers, 4/5 external FIFOs
  jtag_status_reg #(.W(6)) u_j_af (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_AFULL]), .sel2,
    .lshft(shift), .tdi, .status({ext_paf, l1a_af, mem_full}), .tdo(tdo_af));
  // empty list: 7-0 fibers, 8/9 event buffers
  jtag_status_reg #(.W(NFIB + 2)) u_j_mt (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_EMPTY]), .sel2,
    .lshft(shift), .tdi, .status({l1a_empty, fib_empty}), .tdo(tdo_mt));
  // write FIFO of each fiber pair: opcode 13 fibers 1 & 0 ... 16 fibers 7 & 6
  for (genvar k = 0; k < NFIB / 2; k++) begin : g_jwmem
    jtag_status_reg #(.W(2 * IW)) u_j_wmem (.drclk, .rst(jrst), .dvcenb(dvcenb[OP_WMEM + 5'(k)]), .sel2,
      .lshft(shift), .tdi, .status({wr_fifo[2 * k + 1], wr_fifo[2 * k]}), .tdo(tdo_wmem[k]));
  end
endmodule
