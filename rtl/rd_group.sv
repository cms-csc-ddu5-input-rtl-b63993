// rd_group: one read group - four fibers, a pool of FIFOs and a reader.
//
// The memory words of NFIB input units are written into a pool of NFIFO
// first-word-fall-through FIFOs.  mem_ctrl hands each fiber a chain of pool
// FIFOs: a fiber's word goes to its current write FIFO, and a new FIFO is
// linked in when that one reaches its almost-full mark, so a busy fiber can
// use many FIFOs while a quiet one holds only one.  rd_ctrl reads each
// fiber through the head of its chain and writes the assembled events to the
// external FIFO port.  A fiber word is lost (fiber_full) when its write FIFO
// is full; that only happens when the pool has run out.  All outputs are
// registered or decoded from registers; a word written at clock t can be read
// from clock t+2.  For monitoring the group also brings out each fiber's
// write FIFO index and read-side empty flag and the event buffer's empty flag.  The pool size and FIFO depth are the design's (22 x 1024);
// the structure around them is this design's own.
module rd_group
  import in5_pkg::*;
#(
  parameter int unsigned NFIB     = 4,
  parameter int unsigned NFIFO    = NFIFO_DEF,
  parameter int unsigned DEPTH    = FIFO_DEPTH,
  parameter int unsigned START_TO = START_TIMEOUT_DEF,
  parameter int unsigned END_TO   = END_TIMEOUT_DEF,
  parameter int unsigned L1A_AF   = L1A_AF_DEF,
  parameter int unsigned L1A_FULL = L1A_FULL_DEF,
  localparam int unsigned CW      = $clog2(NFIFO + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NFIB-1:0] wen,
  input  logic [35:0]     wdata [NFIB],
  input  logic [NFIB-1:0] live,
  input  logic            l1a,
  input  logic            ext_paf,
  output logic            owen,
  output logic [35:0]     odout,
  output logic [NFIB-1:0] fiber_full,
  output logic [23:0]     l1a_num,
  output logic            l1a_af,
  output logic            l1a_full,
  output logic            l1a_lost,
  output logic [NFIB-1:0] start_to,
  output logic [NFIB-1:0] end_to,
  output logic [CW-1:0]   free_cnt,
  output logic [CW-1:0]   min_free,
  output logic            mem_full,
  output logic [NFIB-1:0] starved,
  output logic [NFIFO-1:0] mem_in_use,
  output logic [$clog2(NFIFO)-1:0] wr_fifo [NFIB],  // FIFO each fiber writes
  output logic [NFIB-1:0] fib_empty,   // nothing to read for the fiber
  output logic            l1a_empty,   // no pending event
  output logic            free_err,    // pool bookkeeping error
  output logic            ren_mt_err,  // fiber read with no pending event
  output logic            busy
);
  localparam int unsigned IW = $clog2(NFIFO);
  localparam int unsigned WW = $clog2(DEPTH + 1) + 1;

  logic [NFIFO-1:0] p_wen, p_rd, p_empty, p_full, p_paf, p_zero;
  logic [35:0]      p_din  [NFIFO];
  logic [35:0]      p_dout [NFIFO];
  logic [WW-1:0]    p_words [NFIFO];

  logic [IW-1:0]    wr_sel [NFIB];
  logic [IW-1:0]    rd_sel [NFIB];
  logic [NFIB-1:0]  wr_ok, rd_ok;
  logic [NFIB-1:0]  f_empty, f_rd;
  logic [35:0]      f_dout [NFIB];

  for (genvar i = 0; i < NFIFO; i++) begin : g_pool
    fwft_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst,
      .wen(p_wen[i]), .din(p_din[i]),
      .rd_en(p_rd[i]), .dout(p_dout[i]),
      .empty(p_empty[i]), .full(p_full[i]), .paf(p_paf[i]),
      .words(p_words[i])
    );
    always_comb p_zero[i] = (p_words[i] == '0);
  end

  // Write routing: each pool FIFO takes the words of the fiber writing it.
  always_comb begin
    p_wen = '0;
    p_rd  = '0;
    for (int i = 0; i < NFIFO; i++) p_din[i] = '0;
    for (int f = 0; f < NFIB; f++) begin
      fiber_full[f] = wen[f] & (~wr_ok[f] | p_full[wr_sel[f]]);
      if (wen[f] && wr_ok[f]) begin
        p_wen[wr_sel[f]] = 1'b1;
        p_din[wr_sel[f]] = wdata[f];
      end
      f_empty[f] = ~rd_ok[f] | p_empty[rd_sel[f]];
      fib_empty[f] = f_empty[f];
      wr_fifo[f]   = wr_sel[f];
      f_dout[f]  = p_dout[rd_sel[f]];
      if (f_rd[f] && rd_ok[f]) p_rd[rd_sel[f]] = 1'b1;
    end
  end

  mem_ctrl #(.NFIB(NFIB), .NFIFO(NFIFO)) u_mem (
    .clk, .rst,
    .fifo_paf(p_paf), .fifo_zero(p_zero),
    .wr_sel, .wr_ok, .rd_sel, .rd_ok,
    .starved, .free_cnt, .min_free, .mem_full, .free_err, .in_use(mem_in_use)
  );

  rd_ctrl #(
    .NFIB(NFIB), .START_TO(START_TO), .END_TO(END_TO),
    .L1A_AF(L1A_AF), .L1A_FULL(L1A_FULL)
  ) u_rd (
    .clk, .rst, .l1a, .live,
    .f_empty, .f_dout, .f_rd,
    .ext_paf, .owen, .odout,
    .l1a_num, .l1a_af, .l1a_full, .l1a_empty, .l1a_lost,
    .start_to, .end_to, .ren_mt_err, .busy
  );
endmodule
