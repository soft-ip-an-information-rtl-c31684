// uart_rx: 8-bit UART receiver whose control FSM carries a hidden signature.
//
// Datapath and control:
//   * sde_fsm, the control circuit: a 9-state Mealy machine with the
//     signature-bearing 9-bit state codes, in product-term form with a scan
//     chain through its state bits.
//   * Shift_Reg1 (3 bits, sync load): after the start bit is seen, its
//     counter output rises on the third following clock, placing the
//     timing near the middle of the start bit.
//   * Shift_Reg2 (SR2_W bits, sync load): reloaded at every sample point and
//     shifted on every other clock, it makes the sample points one bit time
//     (SR2_W clocks) apart.
//   * Shift_Reg3 (9 bits, async load): one-hot latch select. It is shifted
//     at each sample point; its first eight bits enable the data latches,
//     its last bit (counter3) marks that eight bits are in.
//   * data_latches: eight latches on the serial line.
// The clock runs SR2_W (8) times faster than the baud rate. Frame format:
// one start bit (0), 8 data bits LSB first, then the line returns high.
//
// Handshake: when the eighth bit is in, rcv_req rises and data is valid;
// it stays valid while rcv_req is high. The consumer raises rcv_ack; the
// FSM drops rcv_req and waits for rcv_ack to fall with the line idle
// before it looks for the next start bit. If the line goes low while the
// receiver waits for rcv_ack, or rcv_ack is high while the line is low in
// the reset state, the FSM enters its error state (error = 1) and stays
// there until clr.
//
// Timing: with the start bit first seen low in cycle t0, the data samples
// are taken at the clock edges ending cycles t0+10+8k (k = 0..7, for
// SR2_W = 8) and rcv_req rises in cycle t0+67.
//
// Test access: scan_en/scan_in/scan_out reach the FSM's state chain. With
// test_mode = 1 the FSM's inputs come from test_in instead of the line,
// rcv_ack and the three counters, so a tester can apply any input vector
// for one step. The block structure, the register lengths other than
// Shift_Reg2's, the load types and the FSM follow the design; the test
// input multiplexer is this design's own reading of how the verification
// circuit feeds inputs, and SR2_W = 8 resolves a conflict between a
// 7-bit drawing of Shift_Reg2 and its stated 8-clock count.
module uart_rx #(
  parameter int unsigned SR1_W = 3,
  parameter int unsigned SR2_W = 8,
  parameter int unsigned SR3_W = 9
) (
  input  logic                      clk,
  input  logic                      clr,
  input  logic                      rcv_in,
  input  logic                      rcv_ack,
  output logic                      rcv_req,
  output logic                      error,
  output logic [SR3_W-2:0]          data,
  // test access
  input  logic                      scan_en,
  input  logic                      scan_in,
  output logic                      scan_out,
  input  logic                      test_mode,
  input  sde_pkg::fsm_in_t          test_in,
  output sde_pkg::code_t            state
);
  import sde_pkg::*;

  fsm_in_t  fsm_in;
  fsm_out_t fsm_out;
  logic     counter1, counter2, counter3;
  logic [SR1_W-1:0] sr1_q;
  logic [SR2_W-1:0] sr2_q;
  logic [SR3_W-1:0] sr3_q;
  logic [SR3_W-2:0] latch_en;

  always_comb begin
    fsm_in             = '0;
    fsm_in[IN_RCV_IN]  = rcv_in;
    fsm_in[IN_RCV_ACK] = rcv_ack;
    fsm_in[IN_CNT1]    = counter1;
    fsm_in[IN_CNT2]    = counter2;
    fsm_in[IN_CNT3]    = counter3;
    if (test_mode) fsm_in = test_in;
  end

  sde_fsm u_ctrl (
    .clk      (clk),
    .clr      (clr),
    .scan_en  (scan_en),
    .scan_in  (scan_in),
    .scan_out (scan_out),
    .in       (fsm_in),
    .out      (fsm_out),
    .state    (state)
  );

  onehot_shreg #(.WIDTH(SR1_W), .ASYNC_LOAD(1'b0)) u_sr1 (
    .clk (clk), .clr (clr),
    .load (fsm_out[OUT_LOAD1]), .shift (fsm_out[OUT_SHIFT1]),
    .q (sr1_q), .counter (counter1)
  );

  onehot_shreg #(.WIDTH(SR2_W), .ASYNC_LOAD(1'b0)) u_sr2 (
    .clk (clk), .clr (clr),
    .load (fsm_out[OUT_LOAD2]), .shift (fsm_out[OUT_SHIFT2]),
    .q (sr2_q), .counter (counter2)
  );

  onehot_shreg #(.WIDTH(SR3_W), .ASYNC_LOAD(1'b1)) u_sr3 (
    .clk (clk), .clr (clr),
    .load (fsm_out[OUT_LOAD3]), .shift (fsm_out[OUT_SHIFT3]),
    .q (sr3_q), .counter (counter3)
  );

  // Latch i is enabled by select bit SR3_W-1-i (the MSB holds the one after
  // a load, so the first bit received goes to latch 0).
  always_comb begin
    for (int i = 0; i < SR3_W-1; i++) latch_en[i] = sr3_q[SR3_W-1-i];
  end

  data_latches #(.N(SR3_W-1)) u_latch (
    .d  (rcv_in),
    .en (latch_en),
    .q  (data)
  );

  assign rcv_req = fsm_out[OUT_RCV_REQ];
  assign error   = fsm_out[OUT_ERROR];

  // Handshake rules in normal operation: the byte does not change while a
  // request is up, and a request is only withdrawn by an acknowledge or by
  // the line falling (which leads to the error state).
  a_data_stable: assert property (@(posedge clk) disable iff (clr || test_mode || scan_en)
    (rcv_req && $past(rcv_req)) |-> $stable(data));
  a_req_held: assert property (@(posedge clk) disable iff (clr || test_mode || scan_en)
    ($past(rcv_req) && !rcv_req && !$past(test_mode) && !$past(scan_en)) |-> (rcv_ack || !rcv_in));

endmodule
