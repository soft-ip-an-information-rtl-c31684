// scan_dff: one state bit of a scan-testable FSM.
//
// A D flip-flop with a scan multiplexer in front of it. With se = 0 it
// stores the functional next-state bit d; with se = 1 it stores si, the
// output of the previous flip-flop of the scan chain, so the state register
// can be loaded and read serially. clr is an asynchronous, active-high clear
// that loads rst_val, the matching bit of the FSM's reset-state code.
//
// Timing: q changes on the rising edge of clk, or at once when clr rises.
// The port list (clock, clear, data, scan in, scan enable, output, reset
// value) follows the way the state-bit cells of the encoded FSM are
// instantiated; the mux-D construction and the active-high clear are this
// design's own choices.
module scan_dff (
  input  logic clk,
  input  logic clr,
  input  logic d,
  input  logic si,
  input  logic se,
  output logic q,
  input  logic rst_val
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= rst_val;
    else     q <= se ? si : d;
  end

endmodule
