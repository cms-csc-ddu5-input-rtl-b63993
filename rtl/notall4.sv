// notall4: consistency check of four "special word" bits.
//
// NOTALL is high when some, but not all, of the four bits are set: ANY (the
// OR of the bits) exclusive-or ALL (the AND of the bits).  This is the gate
// arrangement of the schematic; it is purely combinational.  The input unit
// uses it on the four E-code flags of an event's last 64-bit word, where a
// mixed pattern means a damaged trailer.
module notall4 (
  input  logic [3:0] b,
  output logic       any,
  output logic       all,
  output logic       notall
);
  always_comb begin
    any    = |b;
    all    = &b;
    notall = any ^ all;
  end
endmodule
