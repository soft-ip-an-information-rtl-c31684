// onehot_shreg: one-hot shift register used as a counter by the UART receiver.
//
// A load writes the pattern 100...0 (only the MSB set); each shift moves the
// pattern one place towards the LSB, filling with 0. The LSB is the
// "counter" output, so it rises WIDTH-1 shifts after a load. The receiver
// uses three of these: a 3-bit one that times the middle of the start bit,
// an 8-bit one that spaces the data samples one bit time apart, and a 9-bit
// one whose first eight bits enable the eight data latches in turn and whose
// last bit marks the eighth sample.
//
// Interface: load and shift come from the control FSM (load wins). With
// ASYNC_LOAD = 0 the load is synchronous; with ASYNC_LOAD = 1 it acts at
// once, like an asynchronous preset, and holds while load is high. clr
// (asynchronous) also loads the pattern, so the counter starts in its
// normal state. In the receiver the asynchronous load is driven by a
// combinational output of the control FSM, as the design specifies; in
// silicon a glitch on that output would reload the register, so the
// load3 term should be kept glitch-free (it is high only in the idle state
// with the line high).
//
// The load patterns, the MSB-is-1 normal state and which register has the
// asynchronous load follow the design; the shift direction, the zero fill
// and the clear behaviour are this design's choices.
module onehot_shreg #(
  parameter int unsigned WIDTH      = 3,
  parameter bit          ASYNC_LOAD = 1'b0
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             load,
  input  logic             shift,
  output logic [WIDTH-1:0] q,
  output logic             counter
);

  localparam logic [WIDTH-1:0] LOAD_VAL = {1'b1, {(WIDTH-1){1'b0}}};

  if (ASYNC_LOAD) begin : g_async
    logic aload;
    assign aload = clr | load;
    always_ff @(posedge clk or posedge aload) begin
      if (aload)      q <= LOAD_VAL;
      else if (shift) q <= q >> 1;
    end
  end else begin : g_sync
    always_ff @(posedge clk or posedge clr) begin
      if (clr)        q <= LOAD_VAL;
      else if (load)  q <= LOAD_VAL;
      else if (shift) q <= q >> 1;
    end
  end

  assign counter = q[0];

endmodule
