// in_unit: fiber input unit - aligns a DMB data stream into memory words.
//
// The fiber delivers one 16-bit word per clock.  K-characters (the idle pair
// K28.5/D16.2 = 0xBC50) mark gaps and words flagged with a receive error are
// skipped.  For FREEZE clocks after reset the input is ignored.  Accepted
// words ("halves") are collected four at a time, one 64-bit DMB word, and
// written as two 36-bit memory words: half 0 in bits 15:0 and half 1 in bits
// 33:18 of the first, halves 2 and 3 in the second.  Bit 16/34 is the FILL
// flag and bit 17/35 the LAST flag of the low/high half.
//
// End of event: a DMB event ends with four E-codes (top nibble 0xE).  The
// unit ends the event
//   - at the fourth E-code in a row, padding the rest of the 64-bit word with
//     FILL halves when words were lost or added before the trailer;
//   - at an idle after at least one E-code, padding the same way (an E-code
//     itself was lost);
//   - for a complete 64-bit word that holds three or four E-codes, when the
//     next half is not a continuing E-code or an idle follows (a single
//     damaged E-code).
// In the last 64-bit word of an event the LAST flag is set on half 1, and on
// half 0 too when the half before it was already an E-code.  So LAST always
// sits in the first memory word of the last 64-bit group, which lets the
// reader stop one memory word later.  A last word whose four halves are not
// all E-codes or fills raises ecode_err for one clock (NOTALL check).
// Because a complete word may wait for the next half before it is known to
// be the last, up to four memory words can be produced in one clock; an
// 8-entry queue issues them one per clock on wen/wdata.  The fill value and
// the exact end rules are this design's reading of the alignment tables.
module in_unit
  import in5_pkg::*;
#(
  parameter int unsigned FREEZE = FREEZE_DEF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] rx_data,
  input  logic        rx_isk,     // K-character (idle) on the link
  input  logic        rx_err,     // receive error: word is skipped
  output logic        wen,
  output logic [35:0] wdata,
  output logic        evt_end,    // one clock: an event's last word was queued
  output logic        ecode_err,  // one clock: inconsistent E-code word
  output logic        dav         // one clock: a data half was accepted
);
  typedef struct packed {
    logic        fill;
    logic        ecode;
    logic [15:0] d;
  } half_t;

  localparam half_t FILL_HALF = '{fill: 1'b1, ecode: 1'b0, d: FILL_WORD};
  localparam int unsigned QD = 8;
  localparam int unsigned FW = (FREEZE > 1) ? $clog2(FREEZE + 1) : 1;

  half_t       bld [4];      // 64-bit word being collected
  logic [1:0]  bcnt;         // halves in bld
  logic        bprev_e;      // half before bld[0] was an E-code
  half_t       hld [4];      // complete word waiting for its end decision
  logic        hvalid;
  logic        hprev_e;
  logic [2:0]  run;          // E-codes in a row, saturating at 4
  logic [FW-1:0] frz;
  logic [35:0] q [QD];
  logic [3:0]  qcnt;
  logic [3:0]  spec;         // E-or-fill flags of the last final word
  logic        spec_v;
  logic        notall;

  function automatic logic [35:0] mkrow(half_t lo, half_t hi, logic l_lo, logic l_hi);
    return {l_hi, hi.fill, hi.d, l_lo, lo.fill, lo.d};
  endfunction

  function automatic int unsigned n_ecode(half_t g [4]);
    int unsigned n = 0;
    for (int i = 0; i < 4; i++) n += int'(g[i].ecode);
    return n;
  endfunction

  always_comb begin
    wen   = (qcnt != 0);
    wdata = q[0];
  end

  notall4 u_notall (.b(spec), .any(), .all(), .notall(notall));
  always_comb ecode_err = spec_v & notall;

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt    <= '0;
      bprev_e <= 1'b0;
      hvalid  <= 1'b0;
      hprev_e <= 1'b0;
      run     <= '0;
      frz     <= FW'(FREEZE);
      qcnt    <= '0;
      evt_end <= 1'b0;
      dav     <= 1'b0;
      spec    <= '0;
      spec_v  <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        bld[i] <= '0;
        hld[i] <= '0;
      end
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else begin
      automatic logic [35:0] pr [4];
      automatic int unsigned np = 0;
      automatic half_t       g [4];
      automatic half_t       h;
      automatic logic [2:0]  nrun;
      automatic logic [35:0] nq [QD];
      automatic int unsigned nc;
      automatic logic        fin = 1'b0;
      automatic logic [3:0]  fspec = '0;

      for (int i = 0; i < 4; i++) pr[i] = '0;
      evt_end <= 1'b0;
      dav     <= 1'b0;
      spec_v  <= 1'b0;

      if (frz != 0) begin
        frz <= frz - 1'b1;
      end else if (!rx_err && rx_isk) begin
        // Idle on the link: settle a waiting word, or pad a broken trailer.
        if (hvalid) begin
          fin = (n_ecode(hld) >= 3);
          pr[0] = mkrow(hld[0], hld[1], fin & hprev_e, fin);
          pr[1] = mkrow(hld[2], hld[3], 1'b0, 1'b0);
          np = 2;
          for (int i = 0; i < 4; i++) fspec[i] = hld[i].ecode | hld[i].fill;
          hvalid <= 1'b0;
          if (fin) begin
            run     <= '0;
            bprev_e <= 1'b0;
          end
        end else if (bcnt != 0 && run != 0) begin
          g = bld;
          for (int i = 1; i < 4; i++) if (i >= int'(bcnt)) g[i] = FILL_HALF;
          fin = 1'b1;
          pr[0] = mkrow(g[0], g[1], bprev_e, 1'b1);
          pr[1] = mkrow(g[2], g[3], 1'b0, 1'b0);
          np = 2;
          for (int i = 0; i < 4; i++) fspec[i] = g[i].ecode | g[i].fill;
          bcnt    <= '0;
          run     <= '0;
          bprev_e <= 1'b0;
        end
      end else if (!rx_err) begin
        // A data half.
        h    = '{fill: 1'b0, ecode: is_ecode(rx_data), d: rx_data};
        nrun = h.ecode ? ((run == 3'd4) ? 3'd4 : run + 3'd1) : 3'd0;
        dav <= 1'b1;
        if (hvalid) begin
          // The waiting word is the last one unless this half continues
          // its run of E-codes.
          automatic logic hf = !(h.ecode && run != 0) && (n_ecode(hld) >= 3);
          pr[0] = mkrow(hld[0], hld[1], hf & hprev_e, hf);
          pr[1] = mkrow(hld[2], hld[3], 1'b0, 1'b0);
          np = 2;
          hvalid <= 1'b0;
          if (hf) begin
            fin = 1'b1;
            for (int i = 0; i < 4; i++) fspec[i] = hld[i].ecode | hld[i].fill;
            nrun = h.ecode ? 3'd1 : 3'd0;
          end
        end
        g = bld;
        g[bcnt] = h;
        if (nrun == 3'd4) begin
          // Fourth E-code in a row: the event ends here.
          automatic logic pe = (fin) ? 1'b0 : ((bcnt == 0 && hvalid) ? hld[3].ecode : bprev_e);
          for (int i = 1; i < 4; i++) if (i > int'(bcnt)) g[i] = FILL_HALF;
          pr[np]     = mkrow(g[0], g[1], pe, 1'b1);
          pr[np + 1] = mkrow(g[2], g[3], 1'b0, 1'b0);
          np += 2;
          fin = 1'b1;
          for (int i = 0; i < 4; i++) fspec[i] = g[i].ecode | g[i].fill;
          bcnt    <= '0;
          bprev_e <= 1'b0;
          run     <= '0;
        end else begin
          if (bcnt == 2'd0) bprev_e <= (fin) ? 1'b0 : ((hvalid) ? hld[3].ecode : bprev_e);
          if (bcnt == 2'd3) begin
            hld     <= g;
            hvalid  <= 1'b1;
            hprev_e <= bprev_e;
            bcnt    <= '0;
            bprev_e <= h.ecode;
          end else begin
            bld[bcnt] <= h;
            bcnt      <= bcnt + 2'd1;
          end
          run <= nrun;
        end
      end

      if (fin) begin
        evt_end <= 1'b1;
        spec    <= fspec;
        spec_v  <= 1'b1;
      end

      // Output queue: pop the head, append the new rows.
      nq = q;
      nc = int'(qcnt);
      if (nc != 0) begin
        for (int i = 0; i < QD - 1; i++) nq[i] = nq[i + 1];
        nc--;
      end
      for (int k = 0; k < 4; k++) begin
        if (k < int'(np) && nc < QD) begin
          nq[nc] = pr[k];
          nc++;
        end
      end
      q    <= nq;
      qcnt <= 4'(nc);
    end
  end
endmodule
