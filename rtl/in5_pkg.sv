// in5_pkg: constants and types shared by the input-control FPGA blocks.
//
// A memory word is 36 bits wide and holds two 16-bit fiber words ("halves").
// Each half carries two flag bits: FILL (bit 16 / bit 34) and LAST (bit 17 /
// bit 35).  On the read-out side bits 34 and 35 are reused as the HDR and TR
// flags of the event framing.  The idle pattern, the bit positions, the
// timeout and event-buffer numbers follow the design notes; the filler
// data value, the E-code test and the status word layout are this design's
// own choices.
package in5_pkg;

  // Fiber link idle: K28.5 followed by D16.2, seen as one 16-bit word.
  localparam logic [15:0] IDLE_WORD   = 16'hBC50;
  // Data value of a filler half (the notes ask for "code C" with FILL set).
  localparam logic [15:0] FILL_WORD   = 16'hCCCC;

  // Bit positions inside a 36-bit memory word.
  localparam int unsigned FILL_LO = 16;
  localparam int unsigned LAST_LO = 17;
  localparam int unsigned FILL_HI = 34;
  localparam int unsigned LAST_HI = 35;
  // Read-out framing flags.
  localparam int unsigned HDR_BIT = 34;
  localparam int unsigned TR_BIT  = 35;

  // Memory pool of one read group.
  localparam int unsigned NFIFO_DEF  = 22;
  localparam int unsigned FIFO_DEPTH = 1024;
  // Almost-full threshold of a fiber FIFO: N-7 words.
  localparam int unsigned PAF_MARGIN = 7;

  // Timeouts in 40 MHz clock periods (25 ns): event start 3.2 us.
  localparam int unsigned START_TIMEOUT_DEF = 128;
  // FIFO done timeout, counted at 12.5 ns in the original: 18945 (~236 us).
  localparam int unsigned END_TIMEOUT_DEF   = 18945;

  // L1A (event) buffer: almost full at 7680 events, full at 8192.
  localparam int unsigned L1A_AF_DEF   = 7680;
  localparam int unsigned L1A_FULL_DEF = 8192;

  // Bunch crossings per orbit cycle: 0 .. 923.
  localparam int unsigned BXN_MAX = 923;

  // Frozen fiber inputs after reset: about 9 bunch crossings.
  localparam int unsigned FREEZE_DEF = 9;

  // HDR/TR framing of a read-out word (bits 35:34 = {TR, HDR}).
  typedef enum logic [1:0] {
    FR_DATA  = 2'b00,   // normal data
    FR_HDR   = 2'b01,   // header word
    FR_LAST  = 2'b10,   // last data word, just before the trailer
    FR_EMPTY = 2'b11    // empty event: header is the only word
  } frame_e;

  // JTAG opcodes that this design implements.
  localparam logic [4:0] OP_NOOP     = 5'd0;
  localparam logic [4:0] OP_L1A0     = 5'd2;
  localparam logic [4:0] OP_STATUS   = 5'd3;
  localparam logic [4:0] OP_STAT_LO  = 5'd4;
  localparam logic [4:0] OP_STAT_HI  = 5'd5;
  localparam logic [4:0] OP_FERR     = 5'd6;
  localparam logic [4:0] OP_FOK      = 5'd7;
  localparam logic [4:0] OP_WMEM     = 5'd13;  // 13..16: fibers 1&0 .. 7&6
  localparam logic [4:0] OP_MEMAVL   = 5'd17;
  localparam logic [4:0] OP_MEMMIN   = 5'd18;
  localparam logic [4:0] OP_AFULL    = 5'd20;
  localparam logic [4:0] OP_FFULL    = 5'd21;
  localparam logic [4:0] OP_EMPTY    = 5'd25;
  localparam logic [4:0] OP_L1A1     = 5'd26;

  // True when a fiber word is an E-code of the DMB trailer.
  function automatic logic is_ecode(input logic [15:0] w);
    return w[15:12] == 4'hE;
  endfunction

endpackage
