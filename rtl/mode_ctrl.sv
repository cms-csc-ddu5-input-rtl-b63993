// mode_ctrl: front-panel mode switch block.
//
// Switches 1-4 give a 4-bit mode number, switch 7 selects fake L1A
// (data pass-through) and switch 8 shows the 32-bit status word on the logic
// analyser (LA) pins and the inverted FPGA version on the diagnostic LEDs.
// In fake-L1A mode each read group is triggered by the end of an event on
// its lowest live fiber instead of by the L1A input, so data flow through
// without a trigger.  Without switch 8 the LA pins show a mode-selected
// diagnostic word and the LEDs show the mode number.  Combinational except
// for the registered L1A outputs.  The switch meanings are the design's;
// what appears on the pins in the other modes is this design's choice.
module mode_ctrl #(
  parameter int unsigned NFIB    = 8,
  parameter logic [7:0]  VERSION = 8'd25
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [3:0]      sw_mode,
  input  logic            sw_fake_l1a,
  input  logic            sw_show_stat,
  input  logic            l1a_in,
  input  logic [NFIB-1:0] live,
  input  logic [NFIB-1:0] evt_end,
  input  logic [31:0]     status,
  input  logic [31:0]     diag [4],
  output logic [1:0]      l1a_grp,
  output logic [31:0]     la,
  output logic [7:0]      led
);
  localparam int unsigned HALF = NFIB / 2;

  logic [1:0] fake;

  always_comb begin
    for (int g = 0; g < 2; g++) begin
      fake[g] = 1'b0;
      for (int f = HALF - 1; f >= 0; f--) begin
        if (live[g * HALF + f]) fake[g] = evt_end[g * HALF + f];
      end
    end
    la  = sw_show_stat ? status : diag[sw_mode[1:0]];
    led = sw_show_stat ? ~VERSION : {4'h0, sw_mode};
  end

  always_ff @(posedge clk) begin
    if (rst) l1a_grp <= '0;
    else     l1a_grp <= sw_fake_l1a ? fake : {2{l1a_in}};
  end
endmodule
