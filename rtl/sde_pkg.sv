// sde_pkg: shared constants of the watermarked UART receiver.
//
// The receiver's control FSM carries a signature in the numeric differences
// between the codes of consecutive states along a chosen path ("state
// difference encoding"). This package holds, in one place:
//   * the nine 9-bit state codes (the solution of the encoding problem),
//   * the 22-edge transition table of the control FSM, written as product
//     terms: a start-state code, an input care mask and value, the
//     destination code and the 8 Mealy outputs,
//   * the 14-step detection path with its input vectors and valid vector,
//     i.e. the contents of the verification pattern ROM.
//
// Control FSM input vector, MSB first: {RCV_IN, RCV_ACK, counter1, counter2,
// counter3}. Output vector, MSB first: {shift1, load1, shift2, load2,
// shift3, load3, RCV_REQ, ERROR}. Both orders, the codes, the transitions
// and the path are the ones the design is specified with; the bit packing
// into vectors and the value 0 used for don't-care inputs in the ROM are
// this implementation's choices.
package sde_pkg;

  localparam int unsigned STATE_W   = 9;   // state register width
  localparam int unsigned NUM_IN    = 5;   // control FSM inputs
  localparam int unsigned NUM_OUT   = 8;   // control FSM outputs
  localparam int unsigned NUM_EDGES = 22;  // transitions of the control STG
  localparam int unsigned PATH_LEN  = 14;  // edges on the detection path

  typedef logic [STATE_W-1:0] code_t;
  typedef logic [NUM_IN-1:0]  fsm_in_t;
  typedef logic [NUM_OUT-1:0] fsm_out_t;

  // State codes (hex). State 8 is the reset state, state 7 the error state.
  localparam code_t S0 = 9'h040;
  localparam code_t S1 = 9'h108;
  localparam code_t S2 = 9'h02B;
  localparam code_t S3 = 9'h0B0;
  localparam code_t S4 = 9'h051;
  localparam code_t S5 = 9'h016;
  localparam code_t S6 = 9'h189;
  localparam code_t S7 = 9'h008;
  localparam code_t S8 = 9'h000;

  localparam code_t RESET_CODE = S8;

  // Input bit positions inside fsm_in_t.
  localparam int unsigned IN_RCV_IN  = 4;
  localparam int unsigned IN_RCV_ACK = 3;
  localparam int unsigned IN_CNT1    = 2;
  localparam int unsigned IN_CNT2    = 1;
  localparam int unsigned IN_CNT3    = 0;

  // Output bit positions inside fsm_out_t.
  localparam int unsigned OUT_SHIFT1  = 7;
  localparam int unsigned OUT_LOAD1   = 6;
  localparam int unsigned OUT_SHIFT2  = 5;
  localparam int unsigned OUT_LOAD2   = 4;
  localparam int unsigned OUT_SHIFT3  = 3;
  localparam int unsigned OUT_LOAD3   = 2;
  localparam int unsigned OUT_RCV_REQ = 1;
  localparam int unsigned OUT_ERROR   = 0;

  // Transition table. Entry e: in state SRC[e], when (in & CARE[e]) ==
  // VAL[e], go to DST[e] and drive OUTV[e]. Index 0 is the last entry.
  typedef code_t    [NUM_EDGES-1:0] code_tab_t;
  typedef fsm_in_t  [NUM_EDGES-1:0] in_tab_t;
  typedef fsm_out_t [NUM_EDGES-1:0] out_tab_t;

  //                    e21 .. e0
  localparam code_tab_t EDGE_SRC = {
    S0, S0,             // idle / start bit
    S1, S1,             // wait for counter1
    S2, S2,             // wait for counter2
    S3, S3, S3,         // sample point
    S4, S4,             // wait for line high
    S5, S5, S5,         // wait for acknowledge
    S6, S6, S6,         // wait for acknowledge
    S7,                 // error
    S8, S8, S8, S8      // reset / end of frame
  };
  localparam code_tab_t EDGE_DST = {
    S0, S1,
    S1, S2,
    S2, S3,
    S2, S4, S6,
    S4, S5,
    S5, S8, S7,
    S6, S8, S7,
    S7,
    S8, S8, S7, S0
  };
  localparam in_tab_t EDGE_CARE = {
    5'b10000, 5'b11000,
    5'b00100, 5'b00100,
    5'b00010, 5'b00010,
    5'b00001, 5'b10001, 5'b10001,
    5'b10000, 5'b10000,
    5'b11000, 5'b11000, 5'b10000,
    5'b11000, 5'b11000, 5'b10000,
    5'b00000,
    5'b11000, 5'b11000, 5'b11000, 5'b11000
  };
  localparam in_tab_t EDGE_VAL = {
    5'b10000, 5'b00000,
    5'b00000, 5'b00100,
    5'b00000, 5'b00010,
    5'b00000, 5'b00001, 5'b10001,
    5'b00000, 5'b10000,
    5'b10000, 5'b11000, 5'b00000,
    5'b10000, 5'b11000, 5'b00000,
    5'b00000,
    5'b11000, 5'b00000, 5'b01000, 5'b10000
  };
  localparam out_tab_t EDGE_OUT = {
    8'b01_01_01_00, 8'b00_00_00_00,
    8'b10_00_00_00, 8'b10_10_00_00,
    8'b10_10_00_00, 8'b10_01_10_00,
    8'b10_10_00_00, 8'b00_00_10_10, 8'b00_00_10_10,
    8'b00_00_00_10, 8'b00_00_00_10,
    8'b00_00_00_10, 8'b00_00_00_00, 8'b00_00_00_00,
    8'b00_00_00_10, 8'b00_00_00_00, 8'b00_00_00_00,
    8'b00_00_00_01,
    8'b00_00_00_00, 8'b00_00_00_00, 8'b00_00_00_00, 8'b00_00_00_00
  };

  // One step of the detection path: put the FSM in start_code, apply
  // inputs, clock once. valid marks the steps whose code difference
  // carries a signature byte.
  typedef struct packed {
    code_t   start_code;
    fsm_in_t inputs;
    logic    valid;
  } pattern_t;

  typedef pattern_t [PATH_LEN-1:0] pattern_tab_t;

  // Path: 8,0,1,2,3,4,5,8,0,1,2,3,6,8,7. Entry 0 is the first step.
  localparam pattern_tab_t PATH = {
    pattern_t'{S8, 5'b01000, 1'b1},   // 13: 8 -> 7
    pattern_t'{S6, 5'b11000, 1'b0},   // 12: 6 -> 8
    pattern_t'{S3, 5'b10001, 1'b1},   // 11: 3 -> 6
    pattern_t'{S2, 5'b00010, 1'b0},   // 10: 2 -> 3
    pattern_t'{S1, 5'b00100, 1'b0},   //  9: 1 -> 2
    pattern_t'{S0, 5'b00000, 1'b0},   //  8: 0 -> 1
    pattern_t'{S8, 5'b10000, 1'b0},   //  7: 8 -> 0
    pattern_t'{S5, 5'b11000, 1'b0},   //  6: 5 -> 8
    pattern_t'{S4, 5'b10000, 1'b1},   //  5: 4 -> 5
    pattern_t'{S3, 5'b00001, 1'b1},   //  4: 3 -> 4
    pattern_t'{S2, 5'b00010, 1'b1},   //  3: 2 -> 3
    pattern_t'{S1, 5'b00100, 1'b1},   //  2: 1 -> 2
    pattern_t'{S0, 5'b00000, 1'b1},   //  1: 0 -> 1
    pattern_t'{S8, 5'b10000, 1'b1}    //  0: 8 -> 0
  };

endpackage
