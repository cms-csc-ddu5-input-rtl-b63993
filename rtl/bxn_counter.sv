// bxn_counter: bunch-crossing number of the accelerator orbit.
//
// Counts one per 40 MHz clock from 0 up to BXN_LAST (923 for the SPS cycle
// named in the design notes) and clears to 0 on the following clock.  An
// optional bc0 input realigns it to 0.  Synchronous reset; the count is a
// registered 12-bit output.  The bc0 input is this design's addition.
module bxn_counter #(
  parameter int unsigned BXN_LAST = in5_pkg::BXN_MAX
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc0,
  output logic [11:0] bxn,
  output logic        wrap
);
  always_comb wrap = (bxn == 12'(BXN_LAST));
  always_ff @(posedge clk) begin
    if (rst || bc0 || wrap) bxn <= '0;
    else                    bxn <= bxn + 12'd1;
  end
endmodule
