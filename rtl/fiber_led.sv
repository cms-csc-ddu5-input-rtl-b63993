// fiber_led: front-panel LEDs of the fiber inputs.
//
// For each fiber the FOK LED is lit when the link is alive and well, blinks
// when a signal is present but the link is not ready, and is off when no
// link is present.  The DAV LED is lit while data is being transmitted:
// each data word retriggers a hold time so that short bursts stay visible.
// Timing comes from a slow clock enable, CLK40/16 (2.5 MHz); the blink
// square wave is bit BLINK_BIT of a counter of slow ticks and the DAV hold
// lasts DAV_HOLD slow ticks.  The LED rules and the 2.5 MHz slow clock are
// from the design notes; the blink rate and the hold time are this design's
// choices.  LED outputs are registered, active high.
module fiber_led #(
  parameter int unsigned NFIB      = 8,
  parameter int unsigned SLOW_DIV  = 16,
  parameter int unsigned BLINK_BIT = 18,
  parameter int unsigned DAV_HOLD  = 65535
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NFIB-1:0] present,
  input  logic [NFIB-1:0] ready,
  input  logic [NFIB-1:0] dav,
  output logic [NFIB-1:0] fok_led,
  output logic [NFIB-1:0] dav_led,
  output logic            slow_tick
);
  localparam int unsigned DW = $clog2(SLOW_DIV);
  localparam int unsigned HW = $clog2(DAV_HOLD + 1);

  logic [DW-1:0]      div;
  logic [BLINK_BIT:0] bcnt;
  logic [HW-1:0]      hold [NFIB];

  always_comb slow_tick = (div == DW'(SLOW_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div  <= '0;
      bcnt <= '0;
    end else begin
      div <= slow_tick ? '0 : div + 1'b1;
      if (slow_tick) bcnt <= bcnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int f = 0; f < NFIB; f++) begin
      if (rst) begin
        hold[f]    <= '0;
        fok_led[f] <= 1'b0;
        dav_led[f] <= 1'b0;
      end else begin
        if (dav[f])                      hold[f] <= HW'(DAV_HOLD);
        else if (slow_tick && hold[f] != 0) hold[f] <= hold[f] - 1'b1;
        fok_led[f] <= ready[f] | (present[f] & bcnt[BLINK_BIT]);
        dav_led[f] <= dav[f] | (hold[f] != 0);
      end
    end
  end
endmodule
