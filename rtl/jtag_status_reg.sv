// jtag_status_reg: capture-and-shift status register read over JTAG.
//
// Clocked by the JTAG data-register clock DRCLK.  The register is clocked
// only while its device enable DVCENB and the user-chain select SEL2 are both
// high (CLKENA = DVCENB & SEL2).  With LSHFT low it captures STATUS in
// parallel; with LSHFT high it shifts right, TDI entering at the top bit and
// the lowest bit on TDO, so STATUS0 leaves first.  The design uses 8, 10,
// 12, 16, 24 and 32 bit versions of this cell.  Asynchronous clear.
module jtag_status_reg #(
  parameter int unsigned W = 16
) (
  input  logic         drclk,
  input  logic         rst,
  input  logic         dvcenb,
  input  logic         sel2,
  input  logic         lshft,
  input  logic         tdi,
  input  logic [W-1:0] status,
  output logic         tdo
);
  logic [W-1:0] sr;
  logic         clkena;

  always_comb clkena = dvcenb & sel2;

  always_ff @(posedge drclk or posedge rst) begin
    if (rst)               sr <= '0;
    else if (clkena) begin
      if (lshft) sr <= W'({tdi, sr} >> 1);
      else       sr <= status;
    end
  end

  always_comb tdo = sr[0];
endmodule
