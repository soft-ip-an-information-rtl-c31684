// data_latches_tb: self-checking test of the eight data latches.
// Walks a one through the enables like the latch-select register does,
// changing the serial input while each latch is open; checks that an open
// latch follows the input, that a closed latch keeps the value present when
// its enable fell, and that with all enables low a changing input disturbs
// nothing.
module data_latches_tb;
  logic       d;
  logic [7:0] en, q;
  logic [7:0] expect_q;
  int checks = 0, failures = 0;

  data_latches dut (.d(d), .en(en), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      logic [7:0] byte_v;
      byte_v = 8'($urandom);
      en = 8'h00; d = 0; #1;
      for (int i = 0; i < 8; i++) begin
        en = 8'h01 << i;
        d = ~byte_v[i]; #1;
        checks++; if (q[i] !== d) begin failures++; $display("latch %0d not transparent", i); end
        d = byte_v[i]; #1;
        checks++; if (q[i] !== d) begin failures++; $display("latch %0d not following", i); end
      end
      en = 8'h00; #1;
      expect_q = byte_v;
      for (int k = 0; k < 4; k++) begin
        d = ~d; #1;
        checks++;
        if (q !== expect_q) begin failures++; $display("held byte %h expected %h", q, expect_q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
