// scan_dff_tb: self-checking test of the scan flip-flop.
// Drives random d, si, se and rst_val for many clocks and compares q with a
// reference register updated by the rule "clear loads rst_val, else se
// picks si, else d"; also checks that the clear acts without a clock edge.
module scan_dff_tb;
  logic clk = 1'b0, clr, d, si, se, q, rst_val;
  logic ref_q;
  int checks = 0, failures = 0;

  scan_dff dut (.clk(clk), .clr(clr), .d(d), .si(si), .se(se), .q(q), .rst_val(rst_val));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0; si = 0; se = 0; rst_val = 1; clr = 0;
    #1; clr = 1; #1;
    checks++; if (q !== 1'b1) begin failures++; $display("clear to 1 failed"); end
    rst_val = 0; clr = 0; #1; clr = 1; #1;
    checks++; if (q !== 1'b0) begin failures++; $display("clear to 0 failed"); end
    clr = 0;
    ref_q = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      d = 1'($urandom); si = 1'($urandom); se = 1'($urandom);
      @(posedge clk);
      ref_q = se ? si : d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("cycle %0d: se=%b d=%b si=%b q=%b expected %b", n, se, d, si, q, ref_q);
      end
    end
    // asynchronous clear in the middle of a cycle
    @(negedge clk);
    rst_val = ~q; clr = 1; #1;
    checks++; if (q !== rst_val) begin failures++; $display("async clear failed"); end
    clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
