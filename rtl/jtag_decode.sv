// jtag_decode: JTAG opcode decoder and TDO selector.
//
// The 5-bit opcode held in the user instruction register is decoded into 32
// one-hot device enables (a 5-to-32 decoder with enable), one per readable
// register, and the TDO of the addressed register is chosen by a 32-to-1
// multiplexer with enable (low when disabled).  Both are combinational.
// Which opcode reads which register is set by the table in in5_pkg.
module jtag_decode (
  input  logic [4:0]  op,
  input  logic        en,
  input  logic [31:0] tdo_bus,
  output logic [31:0] dvcenb,
  output logic        tdo
);
  always_comb begin
    dvcenb = '0;
    if (en) dvcenb[op] = 1'b1;
    tdo = en & tdo_bus[op];
  end
endmodule
