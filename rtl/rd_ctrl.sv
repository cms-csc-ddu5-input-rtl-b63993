// rd_ctrl: builds one output event per L1A from the fibers of a read group.
//
// Every L1A (trigger) is counted in an event buffer counter; it flags
// almost-full at L1A_AF pending events (7680) and full at L1A_FULL (8192),
// l1a_empty while none is pending, and L1As that arrive while full are counted as lost.  For each pending
// event, when the external FIFO is not almost full, the controller
//   1. issues a header word carrying the 24-bit event number;
//   2. visits the live fibers in ascending order.  It reads the fiber's
//      FIFO word by word (first-word-fall-through: a word is taken in the
//      clock its rd pulse is high).  A word with either LAST flag marks the
//      last 64-bit group of that fiber's event; the word after it ends the
//      fiber and the next fiber is selected;
//   3. if a fiber delivers no word for START_TO clocks it is skipped with a
//      start timeout; if it stops for END_TO clocks in mid-event it is
//      abandoned with an end timeout (both latched until reset);
//   4. closes the event.
// Words pass through a one-word holding register so that the last data
// word can be marked.  Bits 35:34 of each output word carry the framing:
// header = HDR, last data word = TR, header of an event with no data = HDR+TR,
// data = neither.  Data bits 33:18 and 17:0 are passed unchanged.  The
// external FIFO's almost-full stops reading and holds the timers.  owen/odout
// are registered; one word per clock at most.  The framing codes, limits
// and timeout values follow the design notes; the per-event fiber order,
// header layout and holding register are this design's choices.
// ren_mt_err is a consistency check that flags a fiber read while the event
// buffer is empty; it cannot occur unless the state is corrupted.
module rd_ctrl
  import in5_pkg::*;
#(
  parameter int unsigned NFIB     = 4,
  parameter int unsigned START_TO = START_TIMEOUT_DEF,
  parameter int unsigned END_TO   = END_TIMEOUT_DEF,
  parameter int unsigned L1A_AF   = L1A_AF_DEF,
  parameter int unsigned L1A_FULL = L1A_FULL_DEF
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            l1a,
  input  logic [NFIB-1:0] live,
  input  logic [NFIB-1:0] f_empty,
  input  logic [35:0]     f_dout [NFIB],
  output logic [NFIB-1:0] f_rd,
  input  logic            ext_paf,
  output logic            owen,
  output logic [35:0]     odout,
  output logic [23:0]     l1a_num,     // number of the event being built
  output logic            l1a_af,
  output logic            l1a_full,
  output logic            l1a_empty,   // no pending event
  output logic            l1a_lost,    // sticky: an L1A arrived while full
  output logic [NFIB-1:0] start_to,    // sticky start timeouts
  output logic [NFIB-1:0] end_to,      // sticky end timeouts
  output logic            ren_mt_err,  // a fiber read while no event is pending
  output logic            busy
);
  localparam int unsigned PW = $clog2(L1A_FULL + 1);
  localparam int unsigned TW = $clog2(((START_TO > END_TO) ? START_TO : END_TO) + 1);
  localparam int unsigned FW = (NFIB > 1) ? $clog2(NFIB) : 1;

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_SEL, S_RD, S_DONE} state_e;

  state_e        st;
  logic [PW-1:0] pend;
  logic [FW:0]   fib;          // next fiber to consider (NFIB = none left)
  logic [FW-1:0] cur;
  logic          started, seen_last;
  logic [TW-1:0] timer;
  logic          hold_v, hold_hdr;
  logic [35:0]   hold_w;

  logic          sel_found;
  logic [FW-1:0] sel_f;
  logic          take;         // a word is read from the current fiber
  logic [35:0]   cur_w;
  logic          evt_done;

  always_comb begin
    sel_found = 1'b0;
    sel_f     = '0;
    for (int f = NFIB - 1; f >= 0; f--)
      if (live[f] && (FW + 1)'(f) >= fib) begin
        sel_found = 1'b1;
        sel_f     = FW'(f);
      end
    cur_w = f_dout[cur];
    take  = (st == S_RD) && !ext_paf && !f_empty[cur];
    f_rd  = '0;
    if (take) f_rd[cur] = 1'b1;
    evt_done = (st == S_DONE);
    l1a_af   = (pend >= PW'(L1A_AF));
    l1a_full = (pend >= PW'(L1A_FULL));
    l1a_empty = (pend == '0);
    busy     = (st != S_IDLE);
    ren_mt_err = (|f_rd) && (pend == '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      pend      <= '0;
      fib       <= '0;
      cur       <= '0;
      started   <= 1'b0;
      seen_last <= 1'b0;
      timer     <= '0;
      hold_v    <= 1'b0;
      hold_hdr  <= 1'b0;
      hold_w    <= '0;
      owen      <= 1'b0;
      odout     <= '0;
      l1a_num   <= 24'd1;
      l1a_lost  <= 1'b0;
      start_to  <= '0;
      end_to    <= '0;
    end else begin
      owen <= 1'b0;

      // Event buffer occupancy.
      if (l1a && l1a_full) l1a_lost <= 1'b1;
      pend <= pend + PW'(l1a && !l1a_full) - PW'(evt_done);

      unique case (st)
        S_IDLE: if (pend != 0 && !ext_paf) st <= S_HDR;
        S_HDR: begin
          hold_v   <= 1'b1;
          hold_hdr <= 1'b1;
          hold_w   <= {2'b00, 8'h00, l1a_num[23:16], 2'b00, l1a_num[15:0]};
          fib      <= '0;
          st       <= S_SEL;
        end
        S_SEL: begin
          if (sel_found) begin
            cur       <= sel_f;
            fib       <= (FW + 1)'(sel_f) + 1'b1;
            started   <= 1'b0;
            seen_last <= 1'b0;
            timer     <= '0;
            st        <= S_RD;
          end else begin
            st <= S_DONE;
          end
        end
        S_RD: begin
          if (take) begin
            // Pass the held word on, hold the new one.
            owen     <= hold_v;
            odout    <= {hold_hdr ? FR_HDR : FR_DATA, hold_w[33:0]};
            hold_v   <= 1'b1;
            hold_hdr <= 1'b0;
            hold_w   <= cur_w;
            started  <= 1'b1;
            timer    <= '0;
            if (seen_last) st <= S_SEL;
            else if (cur_w[LAST_LO] || cur_w[LAST_HI]) seen_last <= 1'b1;
          end else if (!ext_paf) begin
            timer <= timer + 1'b1;
            if (!started && timer == TW'(START_TO - 1)) begin
              start_to[cur] <= 1'b1;
              st <= S_SEL;
            end else if (started && timer == TW'(END_TO - 1)) begin
              end_to[cur] <= 1'b1;
              st <= S_SEL;
            end
          end
        end
        S_DONE: begin
          owen    <= hold_v;
          odout   <= {hold_hdr ? FR_EMPTY : FR_LAST, hold_w[33:0]};
          hold_v  <= 1'b0;
          l1a_num <= l1a_num + 24'd1;
          st      <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
