// sticky_latch: holds each input flag high from its first pulse until reset.
//
// Each bit is a flip-flop whose D input is the OR of the incoming flag and
// its own output, always enabled.  The latch in the schematic has an asynchronous clear;
// here the clear is synchronous, like the rest of the data path - the "Full
// FIFO" latch of the design (12 bits: fiber FIFOs 7-0, the two read
// controllers' L1A buffers, the two external FIFOs).  Output is registered:
// a flag shows one clock after it is seen.
module sticky_latch #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= q | d;
  end
endmodule
