// onehot_shreg_tb: self-checking test of the one-hot counter register.
// Runs a 3-bit synchronous-load and a 9-bit asynchronous-load instance with
// random load/shift controls against a reference that keeps the position
// of the one as an integer (load puts it at the MSB, shift moves it one
// place down until it drops out). Checks q and the counter output every
// clock, that the counter rises exactly WIDTH-1 shifts after a load, and
// that the asynchronous load acts without a clock edge while the
// synchronous one waits for the edge.
module onehot_shreg_tb;
  logic clk = 1'b0, clr;
  logic ld_a, sh_a, cnt_a, ld_b, sh_b, cnt_b;
  logic [2:0] q_a;
  logic [8:0] q_b;
  int pos_a, pos_b;   // index of the one, -1 = register empty
  int checks = 0, failures = 0;

  onehot_shreg #(.WIDTH(3), .ASYNC_LOAD(1'b0)) dut_a (
    .clk(clk), .clr(clr), .load(ld_a), .shift(sh_a), .q(q_a), .counter(cnt_a));
  onehot_shreg #(.WIDTH(9), .ASYNC_LOAD(1'b1)) dut_b (
    .clk(clk), .clr(clr), .load(ld_b), .shift(sh_b), .q(q_b), .counter(cnt_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [8:0] onehot(input int pos);
    return (pos < 0) ? 9'd0 : (9'd1 << pos);
  endfunction

  task automatic check(input string tag);
    checks++;
    if (q_a !== onehot(pos_a)[2:0] || cnt_a !== (pos_a == 0)) begin
      failures++; $display("%s: sync q=%b expected one at %0d", tag, q_a, pos_a);
    end
    checks++;
    if (q_b !== onehot(pos_b) || cnt_b !== (pos_b == 0)) begin
      failures++; $display("%s: async q=%b expected one at %0d", tag, q_b, pos_b);
    end
  endtask

  initial begin
    ld_a = 0; sh_a = 0; ld_b = 0; sh_b = 0; clr = 0;
    #1 clr = 1; #1;
    pos_a = 2; pos_b = 8;
    check("clear");
    clr = 0;

    // count from a load to the counter output, with shift held high
    @(negedge clk); ld_a = 1; ld_b = 1; #1;
    pos_b = 8;
    checks++; if (q_b !== 9'h100) begin failures++; $display("async load not immediate"); end
    @(negedge clk); ld_a = 0; ld_b = 0; sh_a = 1; sh_b = 1;
    for (int n = 1; n <= 8; n++) begin
      @(posedge clk); #1;
      checks++;
      if (cnt_b !== (n == 8)) begin failures++; $display("async counter after %0d shifts = %b", n, cnt_b); end
      if (n <= 3) begin
        checks++;
        if (cnt_a !== (n == 2)) begin failures++; $display("sync counter after %0d shifts = %b", n, cnt_a); end
      end
    end
    // synchronous load waits for the clock
    @(negedge clk); sh_a = 0; sh_b = 0; ld_a = 1; #1;
    checks++; if (q_a !== 3'b000) begin failures++; $display("sync load acted early: %b", q_a); end
    @(posedge clk); #1;
    checks++; if (q_a !== 3'b100) begin failures++; $display("sync load failed: %b", q_a); end
    ld_a = 0;
    pos_a = 2; pos_b = 0;

    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ld_a = ($urandom % 6) == 0; sh_a = 1'($urandom);
      ld_b = ($urandom % 6) == 0; sh_b = 1'($urandom);
      #1;
      if (ld_b) pos_b = 8;              // asynchronous
      check("before edge");
      @(posedge clk); #1;
      if (ld_a) pos_a = 2; else if (sh_a) pos_a = pos_a - 1;
      if (ld_b) pos_b = 8; else if (sh_b) pos_b = pos_b - 1;
      if (pos_a < -1) pos_a = -1;
      if (pos_b < -1) pos_b = -1;
      check("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
