# In5Ctrl: input control FPGA of a CSC DDU board

A DDU (detector-dependent unit) of the CMS cathode strip chambers collects event data from chamber readout boards (DMBs). Each DMB sends its data over an optical fiber. The input control FPGA described here serves eight fibers, and it has three jobs:

- accept each fiber's stream of 16-bit words while it arrives, which happens before and independently of the trigger decision;
- buffer those streams in a shared pool of block-RAM FIFOs, so that a fiber with a large event can borrow memory that quiet fibers do not need;
- for each level-1 accept (L1A), read the fibers out in order and write them as one framed event into an external FIFO.

It also keeps status: full and error flags, FMM (fast monitoring) condition bits, a bunch-crossing counter, LED drive, front-panel mode switches and JTAG read-out registers.

The SystemVerilog in `rtl/` is synthesizable and has no vendor primitives. The transceivers that turn the fibers into 16-bit words are outside this design: their outputs (word, K-character flag, receive-error flag, signal-present and link-OK) are top-level ports.

## Structure

```
             fiber 0..3                          fiber 4..7
   rx_data ─► in_unit ×4 ─┐              rx_data ─► in_unit ×4 ─┐
                          ▼                                      ▼
              rd_group 0 ───────────────         rd_group 1 ───────────────
              │ 22 × fwft_fifo (36×1024) │       │ same                    │
              │ mem_ctrl (pool, chains)  │       │                         │
              │ rd_ctrl  (event builder) │       │                         │
              └──────────► owen[0]/odout[0]      └──────────► owen[1]/odout[1]
   fiber_ok ─► fiber_ok_latch ─► live fibers of both groups
   l1a ─► mode_ctrl (real or fake L1A per group)
   status: sticky_latch (12 full flags, fiber errors), fmm_status, fiber_led,
           bxn_counter, jtag_decode + 16 × jtag_status_reg
```

| File | Role |
|---|---|
| `in5_pkg.sv` | shared constants: memory-word bit positions, idle and fill words, default sizes, frame codes, JTAG opcodes |
| `in5ctrl.sv` | top: 8 input units, 2 read groups, monitoring, JTAG |
| `in_unit.sv` | per-fiber input: idle/error removal, 64-bit alignment, FILL and LAST flags, E-code check |
| `notall4.sv` | "some but not all of four bits" check used on the trailer |
| `rd_group.sv` | one read group: the FIFO pool, write routing and read multiplexing |
| `fwft_fifo.sv` | 36 × 1024 first-word-fall-through FIFO with permuted RAM bits |
| `mem_ctrl.sv` | hands out pool FIFOs, links them per fiber, releases and counts them |
| `rd_ctrl.sv` | event buffer counter, timeouts, event framing |
| `sticky_latch.sv` | flags held until reset |
| `fmm_status.sv` | the four FMM bits |
| `fiber_led.sv` | FOK (lit/blink/off) and DAV LEDs |
| `bxn_counter.sv` | bunch-crossing number, 0 to 923 |
| `fiber_ok_latch.sv` | latched fiber-OK flags: a fiber whose link drops stays out until reset |
| `mode_ctrl.sv` | mode switches: fake L1A, status on the logic-analyser pins, version on the LEDs |
| `jtag_decode.sv`, `jtag_status_reg.sv` | opcode decoder and capture/shift registers on the JTAG user chain |

There is one 40 MHz clock `clk` with an active-high synchronous reset `rst`. The JTAG registers run on the data-register clock `drclk` with their own reset `jrst`.

## Memory word

All buffering is done in 36-bit words. Each word holds two fiber words ("halves"):

| Bits | Content |
|---|---|
| 15:0 | earlier half (low) |
| 16 | FILL flag of the low half |
| 17 | LAST flag of the low half |
| 33:18 | later half (high) |
| 34 | FILL flag of the high half |
| 35 | LAST flag of the high half |

A 64-bit DMB word is four halves, so it takes two memory words. On the output port, bits 35:34 are reused as the frame code:

| 35:34 | Meaning |
|---|---|
| 00 | data word |
| 01 | header of an event |
| 10 | last data word of the event (TR) |
| 11 | header of an event with no data at all |

## The input unit: aligning events to 64 bits

This block is the hardest to follow. A DMB event is a sequence of 16-bit words that should end with four trailer words, the E-codes (top nibble `0xE`). The event's length should be a multiple of four words, so the event fills whole 64-bit words. On a real link, words get lost or damaged. The input unit has to turn whatever arrives into whole 64-bit groups, and it has to mark the last group so that the reader knows where the fiber's event stops.

Before it packs anything, the input unit removes some words:

- words flagged as K-characters are idles (`0xBC50`, K28.5 + D16.2);
- words flagged with a receive error are dropped;
- for `FREEZE` = 9 clocks after reset, all input is ignored.

The remaining words are packed four at a time. The unit then ends an event in one of three ways:

1. **Four E-codes in a row.** The event ends at the fourth E-code. If words were lost earlier, the four E-codes are not on a 64-bit boundary. The unit then pads the last group with FILL halves: value `0xCCCC` with the FILL flag set.
2. **An idle after at least one E-code.** The trailer has been cut short, so the group is padded and closed in the same way. This rule assumes that a DMB sends its four E-codes back to back, with no idle between them.
3. **A complete group holding three or four E-codes** whose next half does not continue the E-code run, or which is followed by an idle. One E-code was damaged, but the trailer is still recognisable.

**LAST flags.** In the first memory word of the last 64-bit group, LAST is always set on the high half. It is also set on the low half when the half before the group was already an E-code. As a result, LAST always appears one memory word before the end. The reader therefore needs no lookahead: after it takes a word with a LAST flag, it takes exactly one more.

**E-code check.** If the final group's four halves are not all E-codes or fills, `ecode_err` pulses. This feeds the FMM warning and the per-fiber status bits.

Because a group may wait one half before the unit knows it is the last, one clock can complete up to four memory words. An 8-entry queue releases them one per clock.

The end and LAST rules reproduce the alignment cases they were built from:

- normal trailer;
- one, two or three words lost before the trailer;
- a lost second or third E-code;
- a bad first or second E-code.

There is one known difference. When the first E-code itself is lost, only the high half of the final group carries LAST, not both halves. Telling "first E-code lost" apart from "second E-code lost" needs the exact E-code values, and those are not fixed here. Either way the reader stops at the right place.

## The FIFO pool and its chains

Each read group has 22 FIFOs of 1024 × 36 bits. That is too little to give every fiber its own worst-case space, but plenty when the space is shared. `mem_ctrl` manages the pool.

- **Grant.** A fiber asks for a FIFO when it has none, or when its current FIFO reaches almost full (1024 − 7 words). One grant is made per clock, lowest fiber first. Fiber 0 takes the lowest free FIFO and the other fibers take the highest, so the pool fills from both ends.
- **Chaining.** A new FIFO is linked as the successor of the fiber's previous one. Each fiber therefore owns a chain of FIFOs in the order it wrote them, and a 1004-word five-CFEB event (2008 memory words) simply spans two FIFOs.
- **Release.** The reader always reads the head of the chain. When the head FIFO is empty, including its output register, and has a successor, the writer has moved on. The head is released and the read pointer follows the link. At most one FIFO is released per clock.
- **Counting.** The free count changes only when exactly one of grant and release happens (count enable = grant XOR release). `mem_full` is set while at most one FIFO is free. The lowest free count since reset is kept for JTAG.

Two consistency checks guard the bookkeeping, and both set the FMM error bit:

- every clock, `free_err` compares the free count with the number of free FIFOs in the in-use map;
- a fiber that needs a FIFO when none is free is reported as a search error (`starved`).

In the read controller, a fiber read while no event is pending (`ren_mt_err`) is flagged the same way. In correct operation none of these fire.

If a fiber's FIFO is full and no FIFO is free, its words are lost. This sets that fiber's bit in the latched full flags and the FMM critical bit. Assertions in `mem_ctrl` check that no FIFO is granted twice and no free FIFO is released.

`fwft_fifo` presents its oldest word on `dout` whenever `empty` is low, and `rd_en` consumes it. A word written at clock t can be read at t+2. Inside, the word is stored with its bits permuted so that the four flag bits sit in the RAM's parity bits. The read side undoes the permutation. `empty` is a flip-flop preset by reset. `words` counts every stored word and changes in the clock of the write. The pool controller relies on `words == 0` to mean that nothing is in flight.

## The read controller: events out

`rd_ctrl` counts L1As in an event buffer counter:

- almost full at 7680 pending events;
- full at 8192;
- an L1A that arrives while the buffer is full is lost, and a sticky flag records it.

For each pending event, while the external FIFO is not almost full, the controller works in this order:

1. It writes a header word: `{01, 8'h00, number[23:16], 2'b00, number[15:0]}`. The 24-bit event number starts at 1.
2. It visits the live fibers in ascending order. A fiber is live while its latched fiber-OK bit is set (see below). From each one it reads words until one word after a word with a LAST flag.
3. A fiber that delivers nothing for `START_TO` = 128 clocks gets a start timeout. A fiber that stops mid-event for `END_TO` = 18945 clocks gets an end timeout. Either way the controller moves to the next fiber. Both timeouts are sticky, per fiber, and drive the FMM error bit.
4. It closes the event.

All words pass through a one-word holding register. This lets the controller mark the last data word of the event with TR (`10`). An event with no data becomes a single header word coded `11`. The external FIFO's almost-full stops reading and holds the timers. The output runs at up to one word per clock.

`END_TO` counts 40 MHz clocks here, about 474 µs. The original count of 18945 was meant for a 12.5 ns clock, about 236 µs. Set `END_TO` = 9473 to get the original time.

## Status, FMM and read-out

**Latched fiber OK.** Reset sets one flag per fiber. The flag clears in the clock after the fiber's link-OK input goes low, and stays clear until the next reset. A fiber whose link failed is therefore never read again in the middle of a run, even if the link comes back. The first 9 clocks after reset are a settling window: fibers not connected at reset drop out there without an error. After that window, any change of a link against its flag is an error. It sets the fiber's error bit and the FMM error bit.

**Latched full flags `lffull[11:0]`** (JTAG opcode 21):

| Bits | Source |
|---|---|
| 7:0 | a fiber lost words to a full FIFO |
| 8, 9 | L1A buffer of group 0 / 1 full |
| 10, 11 | external FIFO 0 / 1 full |

**Status word `status[31:0]`** (opcode 3; also on the logic-analyser pins in show-status mode):

| Bits | Content |
|---|---|
| 7:0 | fiber error (timeout, damaged trailer or link change), latched |
| 9:8 | L1A buffer almost full, groups 1:0 |
| 11:10 | L1A buffer full, groups 1:0 |
| 13:12 | pool nearly exhausted, groups 1:0 |
| 14 | any latched full flag |
| 15 | any external FIFO almost full |
| 23:16 | latched fiber OK |
| 31:24 | damaged E-code seen, latched |

This bit layout is this design's own.

**FMM bits `fmm[3:0]`:**

| Bit | Meaning | Source |
|---|---|---|
| 0 | near full | an L1A buffer almost full, or a pool nearly exhausted; follows its source |
| 1 | warning | damaged E-code, or receive error on a live fiber; latched |
| 2 | error | start or end timeout, fiber link change, or a bookkeeping error (see below); latched |
| 3 | critical | lost fiber data or lost L1A; latched, needs a reset |

**JTAG.** `jtag_op` selects one of 32 registers. Only the selected register sees the clock enable (`DVCENB AND SEL2`). With `shift` low it captures its value. With `shift` high it shifts toward bit 0: TDI enters at the top and TDO is bit 0. Implemented registers (width in brackets):

| Opcode | Register |
|---|---|
| 2 | group 0 event number [24] |
| 3 | status word [32] |
| 4, 5 | status word, low / high half [16] |
| 6 | fiber error flags [8] |
| 7 | raw link-OK inputs [8] |
| 13 … 16 | write FIFO index of fibers 1&0 … 7&6 [2 × 5] |
| 17 | free FIFOs, groups 1 and 0 [10] |
| 18 | minimum free FIFOs [10] |
| 20 | almost-full flags: pools 0/1, event buffers 0/1, external FIFOs 0/1 [6] |
| 21 | latched full flags [12] |
| 25 | empty flags: fibers 7–0, event buffers 0/1 [10] |
| 26 | group 1 event number [24] |

Other opcodes read as 0.

**Front panel:**

- FOK LED: lit for a good link, blinking for a link that has signal but is not OK, off otherwise.
- DAV LED: on while data arrive and for about 26 ms after.
- Switch 7 (fake L1A): each group triggers on its own lowest live fiber's event end instead of the L1A input, for pass-through tests without a trigger.
- Switch 8 (show status): the status word goes to the logic-analyser pins, and the inverted version number (25) to the LEDs.
- Switches 1–4: otherwise they select one of four diagnostic words for the pins. These diagnostic words are this design's own.

The bunch-crossing counter runs from 0 to 923. `bc0` sets it back to 0.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NFIB` | 8 | fibers (two groups of `NFIB/2`) |
| `NFIFO` | 22 | pool FIFOs per group |
| `DEPTH` | 1024 | words per pool FIFO |
| `START_TO` | 128 | start timeout, clocks |
| `END_TO` | 18945 | end timeout, clocks |
| `L1A_AF` | 7680 | event buffer almost full |
| `L1A_FULL` | 8192 | event buffer full |
| `FREEZE` | 9 | clocks ignored after reset |

At these defaults yosys maps the top to about 5900 cells, 5900 flip-flop bits and 1.62 Mbit of memory. That is 44 FIFOs of 36 kbit each, plus the per-fiber output queues.

## Capacity

A DMB event at 8 time samples is 200 × nCFEB + 4 64-bit words, which is twice that many memory words.

| Case | Memory words per fiber | Pool use |
|---|---|---|
| 1 CFEB | 408 | one FIFO |
| 2 CFEBs | 808 | one FIFO |
| 5 CFEBs (largest) | 2008 | chain of two FIFOs |
| 4 fibers of one group, 5 CFEBs each | 2008 each | 8 of 22 FIFOs |

A whole DDU event at its 30070-word limit, split evenly over 15 DMBs, needs four FIFOs per fiber (16 of 22 per group). An event concentrated on a single fiber could exceed a group's 22 528 words unless it is read out while it arrives.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. Example with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_in5ctrl \
    -y rtl -y tb +libext+.sv -Irtl rtl/in5_pkg.sv tb/tb_in5ctrl.sv
./obj_dir/Vtb_in5ctrl
```

For another block, replace `tb_in5ctrl` with `tb_<block>`.

`tb_in5ctrl` runs the whole FPGA at its default sizes, with no parameter overrides, in well under a second. It sends events with random data and random idle gaps, never inside a trailer's run of E-codes. It compares every output word of both groups with words built from what was sent. Over the run it exercises:

- a five-CFEB event that chains into a second FIFO;
- a live but silent fiber (start timeout);
- a fiber that loses a word (FILL padding);
- a damaged E-code (FMM warning);
- JTAG read-out of eleven registers (event number, free and minimum free FIFOs, write FIFO per fiber, empty and almost-full lists, status halves) and show-status mode;
- 11000 back-to-back L1As with no live fiber, which pass almost full and full, lose the excess, and produce one header-only event per accepted L1A;
- links dropped and restored, which must stay out until a reset;
- fake-L1A pass-through after that reset.

Random external almost-full stalls run throughout. Each of these mechanisms is counted, and one that never happened is a failure.

Block testbenches use smaller sizes where the defaults would only make them slower:

- `tb_mem_ctrl` uses 12-word model FIFOs;
- `tb_rd_ctrl` uses short timeouts and a 4-event buffer;
- `tb_fiber_led` uses a fast divider.

`tb_fwft_fifo` runs at the full 1024 depth.

## Where this design departs from or goes beyond its source

These are this design's own choices:

- the status word layout;
- the header word layout;
- the diagnostic words;
- the fill value `0xCCCC`;
- the order in which fibers are read;
- the holding-register framing;
- FIFO chaining by successor links.

It also differs from the original in these ways:

- The LAST flag for a lost first E-code is set on the high half only (see above).
- Every live fiber is expected in every event. There is no per-event list of which DMBs took part.
- The FMM bits are one set for the whole FPGA, not one set per input channel.
- The full-flag latch has a synchronous clear, not an asynchronous one.
- The end timeout counts 40 MHz clocks (see above).
- The pool's physical arrangement in four corners of 11 FIFOs is not modelled.

Not built:

- the DMB error-word, L1A-number and stuck-data checks;
- the remaining JTAG registers, whose contents are not defined;
- a separate, longer start timeout (256 clocks) for calibration events, and a split of the end timeout into "waiting" and "active" kinds;
- a double-data-rate output stage;
- the transceivers and configuration PROMs.
