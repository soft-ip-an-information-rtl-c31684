// data_latches: the UART receiver's eight level-sensitive data latches.
//
// Every latch sees the serial line d. Latch i is transparent while en[i]
// is high and holds when en[i] falls. en is the one-hot content of the
// latch-select shift register, so the one moves from latch to latch at each
// sample point: latch i closes, and so keeps the line value, at the clock
// edge where sample i is taken. Once the one has left all of en, the byte
// stays put until the select register is loaded again.
//
// The latches are intended: they are the receiver's data register.
//
// Interface: d serial input, en[N-1:0] enables, q[N-1:0] held bits (q[0]
// is the first bit received). No reset: q is only meaningful after a frame.
// The latches and their enables from the select register follow the design;
// the bit order (first bit in q[0], as UART sends LSB first) is this
// design's choice.
module data_latches #(
  parameter int unsigned N = 8
) (
  input  logic         d,
  input  logic [N-1:0] en,
  output logic [N-1:0] q
);

  for (genvar i = 0; i < N; i++) begin : g_latch
    always_latch begin
      if (en[i]) q[i] = d;
    end
  end

endmodule
