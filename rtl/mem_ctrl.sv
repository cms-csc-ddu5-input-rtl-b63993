// mem_ctrl: assigns a shared pool of FIFOs to the fibers of a read group.
//
// A group has NFIFO FIFOs (22) shared by NFIB fibers (4).  A fiber asks for
// a FIFO when it has none yet, or when the FIFO it writes reaches its
// almost-full mark and no successor is assigned.  One request is granted
// per clock, lowest fiber first.  The free FIFO is found by an up-search
// (lowest free index) for fiber 0 and a down-search (highest free index)
// for every other fiber, so the pool fills from both ends.  The granted FIFO
// becomes the fiber's write FIFO and is linked as the successor of the
// previous one, so each fiber owns a chain of FIFOs in write order.
//
// On the read side each fiber has a read pointer to the head of its chain.
// When the head FIFO holds no word at all (words==0) and has a successor,
// the writer has moved on: the head FIFO is released back to the pool and
// the pointer follows the link.  At most one release per clock.
//
// The free count (5 bits) changes only when exactly one of grant and release
// happens (count enable = grant XOR release).  mem_full is registered high
// while at most one FIFO is free; min_free keeps the lowest free count seen
// since reset.  As a check on the bookkeeping, free_err is raised (one clock
// later) whenever the free count differs from the number of free FIFOs in
// the in-use map; starved is the search error: a fiber needs a FIFO and
// none is free.  wr_sel/rd_sel are valid while wr_ok/rd_ok.  All state is
// registered; a grant takes effect on the next clock.  The search directions
// and the XOR count enable follow the design; the chaining by successor
// links is this design's own way of keeping each fiber's FIFOs in order.
module mem_ctrl #(
  parameter int unsigned NFIB  = 4,
  parameter int unsigned NFIFO = in5_pkg::NFIFO_DEF,
  localparam int unsigned IW   = $clog2(NFIFO),
  localparam int unsigned CW   = $clog2(NFIFO + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NFIFO-1:0]     fifo_paf,
  input  logic [NFIFO-1:0]     fifo_zero,
  output logic [IW-1:0]        wr_sel [NFIB],
  output logic [NFIB-1:0]      wr_ok,
  output logic [IW-1:0]        rd_sel [NFIB],
  output logic [NFIB-1:0]      rd_ok,
  output logic [NFIB-1:0]      starved,   // asks for a FIFO but none is free
  output logic [CW-1:0]        free_cnt,
  output logic [CW-1:0]        min_free,
  output logic                 mem_full,
  output logic                 free_err,  // free count disagrees with the map
  output logic [NFIFO-1:0]     in_use
);
  logic [NFIFO-1:0] freem;
  logic [IW-1:0]    nxt   [NFIFO];
  logic [NFIFO-1:0] nxt_v;

  logic [NFIB-1:0]  req;
  logic             gnt;
  int unsigned      gnt_f;
  logic [IW-1:0]    up_idx, dn_idx, new_idx;
  logic             any_free;
  logic             rel;
  int unsigned      rel_f;
  logic [IW-1:0]    rel_c;

  always_comb begin
    in_use = ~freem;
    for (int f = 0; f < NFIB; f++)
      req[f] = ~wr_ok[f] | (fifo_paf[wr_sel[f]] & ~nxt_v[wr_sel[f]]);

    any_free = |freem;
    up_idx = '0;
    for (int i = NFIFO - 1; i >= 0; i--) if (freem[i]) up_idx = IW'(i);
    dn_idx = '0;
    for (int i = 0; i < NFIFO; i++) if (freem[i]) dn_idx = IW'(i);

    gnt   = 1'b0;
    gnt_f = 0;
    for (int f = NFIB - 1; f >= 0; f--) if (req[f]) begin gnt = 1'b1; gnt_f = f; end
    starved = any_free ? '0 : req;
    gnt     = gnt & any_free;
    new_idx = (gnt_f == 0) ? up_idx : dn_idx;

    rel   = 1'b0;
    rel_f = 0;
    for (int f = NFIB - 1; f >= 0; f--)
      if (rd_ok[f] && fifo_zero[rd_sel[f]] && nxt_v[rd_sel[f]]) begin
        rel = 1'b1; rel_f = f;
      end
    rel_c = rd_sel[rel_f];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      freem    <= '1;
      nxt_v    <= '0;
      wr_ok    <= '0;
      rd_ok    <= '0;
      free_cnt <= CW'(NFIFO);
      min_free <= CW'(NFIFO);
      mem_full <= 1'b0;
      free_err <= 1'b0;
      for (int i = 0; i < NFIFO; i++) nxt[i] <= '0;
      for (int f = 0; f < NFIB; f++) begin
        wr_sel[f] <= '0;
        rd_sel[f] <= '0;
      end
    end else begin
      automatic logic [CW-1:0] nfc = free_cnt;
      if (gnt) begin
        freem[new_idx]  <= 1'b0;
        nxt_v[new_idx]  <= 1'b0;
        wr_sel[gnt_f]   <= new_idx;
        wr_ok[gnt_f]    <= 1'b1;
        if (wr_ok[gnt_f]) begin
          nxt[wr_sel[gnt_f]]   <= new_idx;
          nxt_v[wr_sel[gnt_f]] <= 1'b1;
        end else begin
          rd_sel[gnt_f] <= new_idx;
          rd_ok[gnt_f]  <= 1'b1;
        end
      end
      if (rel) begin
        freem[rel_c]  <= 1'b1;
        nxt_v[rel_c]  <= 1'b0;
        rd_sel[rel_f] <= nxt[rel_c];
      end
      if (gnt ^ rel) nfc = gnt ? free_cnt - 1'b1 : free_cnt + 1'b1;
      free_cnt <= nfc;
      mem_full <= (nfc <= CW'(1));
      if (nfc < min_free) min_free <= nfc;
      free_err <= (free_cnt != CW'($countones(freem)));
    end
  end

  // A FIFO is never granted while in use, and never released while free.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!gnt || freem[new_idx]) else $error("mem_ctrl: granted a FIFO in use");
      assert (!rel || !freem[rel_c])  else $error("mem_ctrl: released a free FIFO");
    end
  end
endmodule
