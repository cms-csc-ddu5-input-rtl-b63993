// fwft_fifo: 36 x 1024 block-RAM FIFO with first-word-fall-through output.
//
// One block RAM of DEPTH words holds the data.  A write (wen while not full)
// stores din at the write pointer.  The RAM's registered read port is the
// FIFO output: whenever the RAM holds a word and the output register is
// free or being read, the next word is fetched, so the oldest word is always
// waiting on dout while empty is low and rd_en simply consumes it.  empty is
// a flip-flop preset by reset.  A word written at clock t appears on dout
// after clock t+1.
//
// Bits are stored in a permuted order so that the flag bits 16, 17, 34 and
// 35 land in the RAM's parity bits (35->35, 34:27->33:26, 26->17, 25:18->15:8,
// 17->34, 16:9->25:18, 8->16, 7:0->7:0); the read side applies the inverse,
// so the permutation is invisible at the ports.  full is high when all DEPTH
// RAM words are used; paf (almost full) at DEPTH-PAF_MARGIN words (N-7);
// words counts the stored words including the one on dout and changes in
// the clock of the write, so words==0 means nothing is in flight.
// Permutation, FWFT scheme, preset empty and the N-7 mark follow the design;
// the pointer and counter structure is a plain FIFO of this design's own.
module fwft_fifo
  import in5_pkg::*;
#(
  parameter int unsigned DEPTH  = FIFO_DEPTH,
  parameter int unsigned MARGIN = PAF_MARGIN
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wen,
  input  logic [35:0] din,
  input  logic        rd_en,
  output logic [35:0] dout,
  output logic        empty,
  output logic        full,
  output logic        paf,
  output logic [$clog2(DEPTH+1):0] words
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1) + 1;

  function automatic logic [35:0] map_in(logic [35:0] d);
    logic [35:0] m;
    m[35]    = d[35];
    m[33:26] = d[34:27];
    m[17]    = d[26];
    m[15:8]  = d[25:18];
    m[34]    = d[17];
    m[25:18] = d[16:9];
    m[16]    = d[8];
    m[7:0]   = d[7:0];
    return m;
  endfunction

  function automatic logic [35:0] map_out(logic [35:0] m);
    logic [35:0] d;
    d[35]    = m[35];
    d[17]    = m[34];
    d[34:27] = m[33:26];
    d[16:9]  = m[25:18];
    d[26]    = m[17];
    d[8]     = m[16];
    d[25:18] = m[15:8];
    d[7:0]   = m[7:0];
    return d;
  endfunction

  logic [35:0]   mem [DEPTH];
  logic [35:0]   ram_q;
  logic [AW-1:0] wptr, rptr;
  logic [CW-1:0] ram_cnt;
  logic          do_wr, do_rd, fetch;

  always_comb begin
    full  = (ram_cnt == CW'(DEPTH));
    do_wr = wen & ~full;
    do_rd = rd_en & ~empty;
    fetch = (ram_cnt != 0) & (empty | do_rd);
    dout  = map_out(ram_q);
    words = ram_cnt + CW'(!empty);
    paf   = (words >= CW'(DEPTH - MARGIN));
  end

  // RAM with synchronous read port.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= map_in(din);
    if (fetch) ram_q <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr    <= '0;
      rptr    <= '0;
      ram_cnt <= '0;
      empty   <= 1'b1;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (fetch) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      ram_cnt <= ram_cnt + CW'(do_wr) - CW'(fetch);
      if (fetch)      empty <= 1'b0;
      else if (do_rd) empty <= 1'b1;
    end
  end
endmodule
