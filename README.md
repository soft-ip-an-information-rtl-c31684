# A UART receiver that carries a hidden signature in its state codes

This is a small 8-bit UART receiver whose control state machine has been
given an unusual state assignment. The nine states are not numbered 0..8 or
one-hot; they are 9-bit codes chosen so that, along one particular walk
through the state graph, the difference between the code of each state and
the code of the next one spells out a secret. Here the secret is the 64-bit
value `40 C8 DD 85 5F 3B D9 08` (the encrypted form of an author string),
eight bytes carried by eight transitions.

The point is protection of a soft IP core. Function does not depend on the
state codes, so the receiver behaves like any other UART receiver; but the
codes survive synthesis, mapping and layout as long as the state register is
not re-encoded, so the owner can later prove authorship by driving a
suspicious chip (or netlist) through the walk and reading the codes back.
Scan flip-flops on the state bits make that read-back possible on silicon:
scan a start state in, clock once with the right inputs, scan the new state
out. Removing the mark means re-encoding every state and rewriting the output
logic to match; faking a different mark is hard because each state offers
only a few differences to its neighbours.

The repository contains the receiver, its watermarked controller, and the
read-back circuit that a test board wraps around it.

## How the signature sits in the codes

State codes (hex), with state 8 as the reset state and state 7 as the error
state:

| state | 0   | 1   | 2   | 3   | 4   | 5   | 6   | 7   | 8   |
|-------|-----|-----|-----|-----|-----|-----|-----|-----|-----|
| code  | 040 | 108 | 02B | 0B0 | 051 | 016 | 189 | 008 | 000 |

The walk used for the signature is

    8 -> 0 -> 1 -> 2 -> 3 -> 4 -> 5 -> 8 -> 0 -> 1 -> 2 -> 3 -> 6 -> 8 -> 7

with the *valid vector* `1 1 1 1 1 1 0 0 0 0 0 1 0 1`: only steps whose bit
is 1 carry a byte. Steps marked 0 exist only to get from one carrying edge to
the next (the first lap through the receive loop fixes the codes of states
0..5, so the second lap can carry nothing new). The carrying steps and their
absolute code differences:

| step | edge   | codes       | difference |
|------|--------|-------------|------------|
| 0    | 8 -> 0 | 000 -> 040  | 40 |
| 1    | 0 -> 1 | 040 -> 108  | C8 |
| 2    | 1 -> 2 | 108 -> 02B  | DD |
| 3    | 2 -> 3 | 02B -> 0B0  | 85 |
| 4    | 3 -> 4 | 0B0 -> 051  | 5F |
| 5    | 4 -> 5 | 051 -> 016  | 3B |
| 11   | 3 -> 6 | 0B0 -> 189  | D9 |
| 13   | 8 -> 7 | 000 -> 008  | 08 |

A byte of 00 can only ride on a self-loop. The signature is encrypted before
it is embedded, so that the few differences a given state graph offers are
unlikely to spell out some other meaningful text. The codes were found by
minimising the sum of all nine codes subject to the eight difference
equations and to all codes being distinct; the cost is a 9-bit state
register where 4 bits would do.

All of these numbers live in one place, `rtl/sde_pkg.sv`, together with the
transition table and the read-back path.

## The control FSM in product-term form (`sde_fsm`)

A synthesis tool that recognises a state machine may re-encode it and wipe
out the mark. The controller is therefore not written as a `case` on an
enumerated state. Instead it is written the way a netlist generator would
emit it:

* every edge *e* of the state graph gets one product term
  `p[e] = (state == SRC[e]) & (in matches VAL[e] on the bits in CARE[e])`;
* next-state bit *b* is the OR of the terms whose destination code has bit
  *b* set, and each output bit is the OR of the terms that drive it high;
* every state bit is a separate `scan_dff` (a mux-D flip-flop with an
  asynchronous clear to its bit of the reset code), chained bit 0 -> bit 8.
  With `scan_en = 1` a code enters at bit 0 and leaves from bit 8, so codes
  are shifted in and out MSB first.

A consequence of this form: a state/input pair that no edge covers drives
all terms to 0, so the machine goes to code 000 (state 8, the reset state)
with all outputs low. Only one pair in the graph is uncovered (state 0 with
the line low and `RCV_ACK` high); unused codes fall back the same way.

`sde_fsm` is generic: the tables are parameters (`SW` state bits, `NI`
inputs, `NO` outputs, `NE` edges) with the UART controller as the default.
Its testbench also runs a three-state, one-input example through it.

### The receiver's state graph

Inputs `{RCV_IN, RCV_ACK, counter1, counter2, counter3}`, outputs
`{shift1 load1, shift2 load2, shift3 load3, RCV_REQ ERROR}`; `*` is don't
care.

| from | condition   | to | outputs    | meaning |
|------|-------------|----|------------|---------|
| 0 | 1 * * * * | 0 | 01 01 01 00 | idle line, keep all counters loaded |
| 0 | 0 0 * * * | 1 | 00 00 00 00 | start bit seen |
| 1 | * * 0 * * | 1 | 10 00 00 00 | wait for the middle of the start bit |
| 1 | * * 1 * * | 2 | 10 10 00 00 | |
| 2 | * * * 0 * | 2 | 10 10 00 00 | count one bit time |
| 2 | * * * 1 * | 3 | 10 01 10 00 | sample: close one data latch, reload bit timer |
| 3 | * * * * 0 | 2 | 10 10 00 00 | more bits to come |
| 3 | 0 * * * 1 | 4 | 00 00 10 10 | eighth bit in, line low: request |
| 3 | 1 * * * 1 | 6 | 00 00 10 10 | eighth bit in, line high: request |
| 4 | 0 * * * * | 4 | 00 00 00 10 | wait for the line to rise |
| 4 | 1 * * * * | 5 | 00 00 00 10 | |
| 5, 6 | 1 0 * * * | same | 00 00 00 10 | wait for RCV_ACK |
| 5, 6 | 1 1 * * * | 8 | 00 00 00 00 | acknowledged |
| 5, 6 | 0 * * * * | 7 | 00 00 00 00 | line fell before acknowledge: error |
| 7 | * * * * * | 7 | 00 00 00 01 | error, until reset |
| 8 | 1 1 / 0 0 | 8 | 00 00 00 00 | wait for RCV_ACK low with the line idle |
| 8 | 0 1 * * * | 7 | 00 00 00 00 | error |
| 8 | 1 0 * * * | 0 | 00 00 00 00 | back to idle |

## Receiver datapath and timing (`uart_rx`)

The clock runs at 8x the baud rate. The controller drives three one-hot
shift registers (`onehot_shreg`; a load writes 1 into the MSB, a shift moves
it one place towards the LSB with 0 fill, the LSB is the counter output):

* **Shift_Reg1**, 3 bits, synchronous load: after the start bit is first
  seen, its counter fires on the third clock, near the middle of the start
  bit.
* **Shift_Reg2**, 8 bits, synchronous load: reloaded at each sample point,
  shifted on the seven clocks between, so samples are exactly 8 clocks
  apart.
* **Shift_Reg3**, 9 bits, asynchronous load: the latch select. Its first
  eight bits enable eight level-sensitive latches (`data_latches`) on the
  serial line; each sample shifts the one along, which closes the current
  latch at the sample edge and opens the next. The ninth bit is
  `counter3`: eight bits are in. The final shift empties the register, so
  all latches hold until the register is reloaded in idle.

The latches are intentional; the synthesis report lists 8 latch bits for
this reason.

Timing, if the start bit is first seen low in clock cycle t0: the data bits
are sampled at the clock edges ending cycles t0+10+8k (k = 0..7), i.e. 2-3
clocks into each bit, and `RCV_REQ` rises in cycle t0+67, while the last
data bit is still on the line. The byte on `data` (first bit received in
`data[0]`) is valid while `RCV_REQ` is high. The handshake is four-phase:
raise `RCV_ACK`, see `RCV_REQ` fall, drop `RCV_ACK`; the receiver returns to
idle only when `RCV_ACK` is low and the line is high. A low line while the
receiver waits for the acknowledge (or while `RCV_ACK` is still high after
it) is taken as an error: `ERROR` goes high and stays high until `clr`. The
stop bit is otherwise not checked. Two assertions in `uart_rx` state the
handshake rules: `data` is stable while `RCV_REQ` stays high, and `RCV_REQ`
only falls when `RCV_ACK` is high or the line is low.

Test access on `uart_rx`: the scan chain (`scan_en`, `scan_in`,
`scan_out`), the current code (`state`), and `test_mode`, which makes the
controller take its five inputs from `test_in` instead of the line, the
acknowledge and the counters. That is how a tester applies the exact input
vector of a path step.

## Reading the signature back (`scan_ctrl`, `pattern_rom`)

`pattern_rom` holds the 14 steps of the walk: start code, the input vector
of the edge (don't-cares stored as 0) and the valid bit.

`scan_ctrl` has two modes. With `verify = 0` it is the receiver's consumer:
it copies each received byte to the display and acknowledges it. With
`verify = 1` it walks the ROM; for each step

1. `LOAD` reads the pattern (1 clock),
2. `SCAN_IN` shifts the start code into the state chain (9 clocks),
3. `STEP` clocks the controller once in test mode with the stored inputs
   (1 clock),
4. `SCAN_OUT` shifts the reached code out (9 clocks),
5. `SHOW` puts it on the display (`code_ready = 1`) until a one-clock
   `step` pulse.

So a new code appears 20 clocks after each `step`. The hardware only shows
the codes; the byte is the absolute difference between a step's code and
the previous step's (000 before step 0), taken on the steps whose
`pattern_valid` is 1. After the last step `verify_done` rises; dropping
`verify` scans the reset code back into the controller (9 clocks) and
returns to normal reception.

## Board top (`sde_board_top`)

`uart_rx` + `pattern_rom` + `scan_ctrl` + two `seg7_decoder` digits.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, 8x baud rate |
| `clr` | in | 1 | asynchronous reset, active high |
| `rs232_rx` | in | 1 | serial line (logic level) |
| `verify` | in | 1 | 0 = receive and display bytes, 1 = read the signature |
| `step` | in | 1 | one-clock pulse: next read-back step |
| `seg_hi`, `seg_lo` | out | 7 each | hex digits, `{g,f,e,d,c,b,a}`, active high |
| `disp_byte` | out | 8 | byte on the digits |
| `scan_code` | out | 9 | full code of the last read-back step (the digits show its low byte) |
| `code_ready` | out | 1 | a read-back code is on display |
| `pattern_idx` | out | 4 | read-back step number |
| `pattern_valid` | out | 1 | that step carries a signature byte |
| `verify_done` | out | 1 | all 14 steps done |
| `rx_error` | out | 1 | receiver error state |

## Where this design makes its own choices

The block structure, register lengths (except Shift_Reg2), load types, the
state graph, the state codes, the walk and the valid vector are those of the
original design. The following are this implementation's choices:

* **Shift_Reg2 is 8 bits.** The original block diagram draws it with 7
  cells and a 7-character load value, but also states that it counts 8
  clocks at 8x oversampling. A 7-bit register puts samples 7 clocks apart,
  which drifts out of the bit cell by the third data bit, so 8 bits are
  used (`SR2_W` parameter of `uart_rx`).
* State bits are clocked scan flip-flops. A netlist style with separate
  latches per state bit is also described; the flip-flop chain is used
  because it is what the scan read-back needs.
* The `test_mode` multiplexer on the controller inputs, the `step` input,
  acknowledging received bytes inside `scan_ctrl`, and scanning the reset
  code back after read-back.
* Shift_Reg3's asynchronous load comes straight from a combinational FSM
  output, as in the original; a glitch on it would reload the latch select,
  so this path needs care in a real implementation.
* Shift direction and zero fill of the counters, their reset value (the
  loaded pattern), the bit order of the received byte, `clr` polarity, the
  seven-segment encoding, and the don't-care fill of the ROM.
* The original demonstration shows the read-back code on two digits; here
  the full 9-bit code is also brought out because bit 8 does not fit.

Not built: the software that chooses the walk and solves for the codes, the
encryption of the signature, and the host PC that sends the serial data.
To put a different signature into the controller, those steps have to be
redone offline and the new codes and walk entered in `sde_pkg`.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert --top-module sde_board_top_tb \
        rtl/sde_pkg.sv rtl/*.sv tb/sde_board_top_tb.sv
    ./obj_dir/Vsde_board_top_tb

Replace `sde_board_top_tb` by any other `*_tb` module for a single block.
The package must come first on the command line. Add `-Wno-fatal` if your
lint settings turn warnings into errors.

| testbench | what it shows |
|-----------|---------------|
| `sde_board_top_tb` | whole board at default size: bytes received and shown on the digits (both end-of-frame branches), full read-back with the eight signature bytes recomputed from the displayed codes, reception again after read-back, error state and recovery |
| `uart_rx_tb` | 18 frames: data, 67-clock request latency, 8-clock sample spacing, handshake, both error conditions, one scan/test-mode step |
| `sde_fsm_tb` | every state code (and two unused ones) x all 32 inputs against a reference of the state graph, through the scan chain; the code differences of the walk; a 3-state example machine |
| `scan_ctrl_tb` | handshake, 14 read-back steps at 20 clocks each against a scan-chain model, signature recomputed, reset code restored |
| `onehot_shreg_tb`, `data_latches_tb`, `scan_dff_tb`, `pattern_rom_tb`, `seg7_decoder_tb` | the leaf blocks against independent reference models |

## Files

* `rtl/sde_pkg.sv` - codes, transition table, read-back path
* `rtl/sde_fsm.sv`, `rtl/scan_dff.sv` - watermarked controller
* `rtl/uart_rx.sv`, `rtl/onehot_shreg.sv`, `rtl/data_latches.sv` - receiver
* `rtl/scan_ctrl.sv`, `rtl/pattern_rom.sv`, `rtl/seg7_decoder.sv` - read-back and display
* `rtl/sde_board_top.sv` - top level
* `tb/*_tb.sv` - testbenches
