// uart_rx_tb: self-checking test of the watermarked UART receiver.
//
// Sends 8N1 frames at 8 clocks per bit and checks for each: the received
// byte, that rcv_req rises exactly 67 clocks after the first cycle the
// start bit is seen, that the eight sample points are 8 clocks apart, and
// the four-phase rcv_req/rcv_ack handshake. Bytes with bit 7 = 0 and = 1
// exercise both end-of-frame branches (wait for the line to rise / line
// already high). Then it drives the two error conditions (line falls while
// waiting for rcv_ack; rcv_ack high with the line low after a frame),
// checks the error output sticks until clr, and uses test_mode with the
// scan chain to take one edge of the control FSM.
module uart_rx_tb;
  import sde_pkg::*;

  localparam int BIT = 8;   // clocks per bit

  logic clk = 1'b0, clr;
  logic rcv_in, rcv_ack, rcv_req, error;
  logic [7:0] data;
  logic scan_en, scan_in, scan_out, test_mode;
  fsm_in_t test_in;
  code_t state;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_frames = 0, n_bit7_low = 0, n_bit7_high = 0, n_err_line = 0, n_err_ack = 0, n_scan = 0;

  uart_rx dut (.clk(clk), .clr(clr), .rcv_in(rcv_in), .rcv_ack(rcv_ack), .rcv_req(rcv_req),
               .error(error), .data(data), .scan_en(scan_en), .scan_in(scan_in),
               .scan_out(scan_out), .test_mode(test_mode), .test_in(test_in), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counter and timing monitor
  int t_start = -1, t_req = -1;
  int samples [$];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!test_mode && !scan_en) begin
      if (state == S0 && !rcv_in && t_start < 0) t_start = cycle;
      if (state == S2 && dut.fsm_out[OUT_SHIFT3]) samples.push_back(cycle);
      if (rcv_req && t_req < 0) t_req = cycle;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk); rcv_in = 0;
    repeat (BIT-1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); rcv_in = b[i];
      repeat (BIT-1) @(negedge clk);
    end
    @(negedge clk); rcv_in = 1;            // stop bit / idle
  endtask

  task automatic receive(input logic [7:0] b);
    t_start = -1; t_req = -1; samples.delete();
    fork
      send_byte(b);
      begin
        wait (rcv_req === 1'b1);
        @(negedge clk);
        check(data === b, $sformatf("byte %h received as %h", b, data));
        check(error === 1'b0, "error during frame");
      end
    join
    // stop bit
    repeat (BIT) @(negedge clk);
    check(rcv_req === 1'b1, "rcv_req dropped before acknowledge");
    check(t_req - t_start == 67, $sformatf("rcv_req after %0d clocks, expected 67", t_req - t_start));
    check(samples.size() == 8, $sformatf("%0d sample points", samples.size()));
    for (int k = 1; k < samples.size(); k++)
      check(samples[k] - samples[k-1] == BIT, "sample spacing");
    if (b[7]) n_bit7_high++; else n_bit7_low++;
    rcv_ack = 1;
    @(negedge clk); #1;
    check(rcv_req === 1'b0, "rcv_req still high after acknowledge");
    check(data === b, "data changed at acknowledge");
    repeat (3) @(negedge clk);
    rcv_ack = 0;
    repeat (3) @(negedge clk);
    check(state == S0, "not back in idle");
    n_frames++;
  endtask

  initial begin
    rcv_in = 1; rcv_ack = 0; scan_en = 0; scan_in = 0; test_mode = 0; test_in = '0;
    clr = 0; #1 clr = 1; #20 clr = 0;
    repeat (4) @(negedge clk);
    check(state == S0, "idle after reset");

    receive(8'h55);
    receive(8'hA3);
    receive(8'h00);
    receive(8'hFF);
    for (int r = 0; r < 12; r++) receive(8'($urandom));

    // error 1: the line falls while waiting for rcv_ack
    send_byte(8'h3C);
    repeat (BIT) @(negedge clk);
    check(rcv_req === 1'b1, "request before line error");
    rcv_in = 0;
    @(negedge clk); #1;
    check(error === 1'b1 && state == S7, "line error not flagged");
    rcv_in = 1; rcv_ack = 1;
    repeat (20) @(negedge clk);
    check(error === 1'b1, "error state not sticky");
    if (error) n_err_line++;
    rcv_ack = 0;
    clr = 1; #2 clr = 0;
    repeat (3) @(negedge clk);
    check(error === 1'b0 && state == S0, "clr does not leave the error state");

    // error 2: acknowledge still high when the line goes low after a frame
    send_byte(8'h81);
    repeat (BIT) @(negedge clk);
    rcv_ack = 1;
    @(negedge clk);
    check(state == S8 && rcv_req === 1'b0, "not in end-of-frame state");
    rcv_in = 0;
    @(negedge clk); #1;
    check(error === 1'b1, "acknowledge error not flagged");
    if (error) n_err_ack++;
    rcv_in = 1; rcv_ack = 0;
    clr = 1; #2 clr = 0;

    // test access: scan in state 3, take the 3 -> 6 edge, scan out
    begin
      code_t got;
      test_mode = 1;
      for (int b = STATE_W-1; b >= 0; b--) begin
        @(negedge clk); scan_en = 1; scan_in = S3[b];
      end
      @(negedge clk); scan_en = 0; test_in = 5'b10001;
      check(state == S3, "scan-in of state 3");
      @(negedge clk); test_in = '0; scan_en = 1; scan_in = 0;
      got = '0;
      for (int b = 0; b < STATE_W; b++) begin
        @(posedge clk); got = {got[STATE_W-2:0], scan_out};
      end
      @(negedge clk); scan_en = 0; test_mode = 0;
      check(got == S6, $sformatf("scan-out %h, expected state 6", got));
      check(int'(got) - int'(S3) == 'hD9, "state 3 -> 6 difference");
      n_scan++;
      clr = 1; #2 clr = 0;
    end

    // each mechanism happened
    check(n_frames >= 16, "frames");
    check(n_bit7_low > 0, "end of frame with line low (wait for stop bit)");
    check(n_bit7_high > 0, "end of frame with line high");
    check(n_err_line > 0, "line error");
    check(n_err_ack > 0, "acknowledge error");
    check(n_scan > 0, "scan step");
    $display("frames=%0d bit7_low=%0d bit7_high=%0d line_err=%0d ack_err=%0d scan=%0d",
             n_frames, n_bit7_low, n_bit7_high, n_err_line, n_err_ack, n_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
