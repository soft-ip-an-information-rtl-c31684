// seg7_decoder_tb: self-checking test of the hex to seven-segment decoder.
// For each of the 16 digits, checks every segment against a table of which
// digits light that segment (segment a: 0,2,3,5,6,7,8,9,A,C,E,F and so on),
// i.e. the expected pattern is built per segment rather than per digit.
module seg7_decoder_tb;
  logic [3:0] hex;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  seg7_decoder dut (.hex(hex), .seg(seg));

  // bit h of LIT[s] = 1 when digit h lights segment s (a = 0 .. g = 6)
  localparam logic [15:0] LIT [7] = '{
    16'b1101_0111_1110_1101,   // a: 0 2 3 5 6 7 8 9 A C E F
    16'b0010_0111_1001_1111,   // b: 0 1 2 3 4 7 8 9 A d
    16'b0010_1111_1111_1011,   // c: 0 1 3 4 5 6 7 8 9 A b d
    16'b0111_1011_0110_1101,   // d: 0 2 3 5 6 8 b C d E
    16'b1111_1101_0100_0101,   // e: 0 2 6 8 A b C d E F
    16'b1101_1111_0111_0001,   // f: 0 4 5 6 8 9 A b C E F
    16'b1110_1111_0111_1100    // g: 2 3 4 5 6 8 9 A b d E F
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 16; h++) begin
      hex = 4'(h); #1;
      for (int s = 0; s < 7; s++) begin
        checks++;
        if (seg[s] !== LIT[s][h]) begin
          failures++; $display("digit %h segment %0d = %b", h, s, seg[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
