// fiber_ok_latch: latched fiber-OK flags (LFOK) and fiber status change.
//
// Reset sets every LFOK bit (a preset flip-flop per fiber).  From then on a
// bit is cleared in the clock after its link-OK input is low and stays
// cleared until the next reset, so a fiber that lost its link is not read
// again until the board is reset.  A fiber that is not connected at reset
// drops out during the first SETTLE clocks.  After that window any change of
// a link-OK input against its LFOK bit - a good link failing or a failed link
// coming back - sets that fiber's sticky change flag, which the top reports
// as an error.
// Ports: fiber_ok in, lfok out (the fibers the read controllers treat as
// live), changed out (sticky, per fiber).  All outputs are registered.
// The preset flip-flop, the need for a reset after a status change and the
// error on a change follow the design notes; the settling window (the
// input-freeze time after reset) is this design's choice.
module fiber_ok_latch #(
  parameter int unsigned NFIB   = 8,
  parameter int unsigned SETTLE = in5_pkg::FREEZE_DEF
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NFIB-1:0] fiber_ok,
  output logic [NFIB-1:0] lfok,
  output logic [NFIB-1:0] changed
);
  localparam int unsigned SW = $clog2(SETTLE + 1);

  logic [SW-1:0] cnt;
  logic          settled;

  always_comb settled = (cnt == SW'(SETTLE));

  always_ff @(posedge clk) begin
    if (rst) begin
      lfok    <= '1;
      changed <= '0;
      cnt     <= '0;
    end else begin
      if (!settled) cnt <= cnt + 1'b1;
      lfok <= lfok & fiber_ok;
      if (settled) changed <= changed | (lfok ^ fiber_ok);
    end
  end
endmodule
