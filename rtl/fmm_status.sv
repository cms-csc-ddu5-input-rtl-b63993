// fmm_status: condition bits reported to the fast monitoring (FMM/TTS) path.
//
// Four bits, one per condition named in the design notes:
//   bit 0 NEARFULL       - buffers filling, the trigger should slow down;
//                          follows its input, not latched;
//   bit 1 SINGLE_WARNING - an isolated, recoverable data problem (e.g. a
//                          damaged E-code); latched;
//   bit 2 SINGLE_ERROR   - a fiber timed out; latched;
//   bit 3 CRITICAL_ERROR - data were lost; a reset is required; latched.
// Latched bits hold until reset.  Outputs are registered.  Which event feeds
// which bit is this design's reading of the notes.
module fmm_status (
  input  logic       clk,
  input  logic       rst,
  input  logic       nearfull,
  input  logic       warn,
  input  logic       err,
  input  logic       crit,
  output logic [3:0] fmm
);
  always_ff @(posedge clk) begin
    if (rst) fmm <= '0;
    else begin
      fmm[0] <= nearfull;
      fmm[1] <= fmm[1] | warn;
      fmm[2] <= fmm[2] | err;
      fmm[3] <= fmm[3] | crit;
    end
  end
endmodule
