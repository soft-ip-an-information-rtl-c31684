// sde_board_top_tb: end-to-end test of the board design at its default size.
//
// 1. Normal reception: sends 8N1 frames on rs232_rx at 8 clocks per bit and
//    checks the byte on the display register and on both seven-segment
//    digits (decoded back to hex by a lookup in this bench), with bytes
//    whose bit 7 is 0 and 1 so that both end-of-frame branches of the
//    control FSM run.
// 2. Signature read-out: switches to verify mode, steps through the whole
//    detection path, collects the scanned-out codes, and recomputes from
//    them the hidden bytes 40 C8 DD 85 5F 3B D9 08; it also checks each
//    code against the expected destination state.
// 3. Leaves verify mode (the reset code is scanned back in) and receives
//    again, proving the receiver works after the read-out.
// 4. A glitch on the line right after a request drives the receiver into
//    its error state; clr recovers it.
// Every mechanism is counted and a count of zero is a failure.
module sde_board_top_tb;
  import sde_pkg::*;

  localparam int BIT = 8;

  logic clk = 1'b0, clr, rs232_rx, verify, step;
  logic [6:0] seg_hi, seg_lo;
  logic rx_error, code_ready, pattern_valid, verify_done;
  logic [7:0] disp_byte;
  code_t scan_code;
  logic [3:0] pattern_idx;
  int checks = 0, failures = 0;
  int n_frames = 0, n_bit7_low = 0, n_bit7_high = 0, n_codes = 0, n_sig = 0,
      n_restore = 0, n_error = 0;

  sde_board_top dut (
    .clk(clk), .clr(clr), .rs232_rx(rs232_rx), .verify(verify), .step(step),
    .seg_hi(seg_hi), .seg_lo(seg_lo), .rx_error(rx_error), .disp_byte(disp_byte),
    .scan_code(scan_code), .code_ready(code_ready), .pattern_idx(pattern_idx),
    .pattern_valid(pattern_valid), .verify_done(verify_done));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // segment patterns {g,f,e,d,c,b,a} back to a hex digit, -1 if none
  function automatic int seg2hex(input logic [6:0] s);
    case (s)
      7'h3F: return 0;  7'h06: return 1;  7'h5B: return 2;  7'h4F: return 3;
      7'h66: return 4;  7'h6D: return 5;  7'h7D: return 6;  7'h07: return 7;
      7'h7F: return 8;  7'h6F: return 9;  7'h77: return 10; 7'h7C: return 11;
      7'h39: return 12; 7'h5E: return 13; 7'h79: return 14; 7'h71: return 15;
      default: return -1;
    endcase
  endfunction

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk); rs232_rx = 0;
    repeat (BIT-1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); rs232_rx = b[i];
      repeat (BIT-1) @(negedge clk);
    end
    @(negedge clk); rs232_rx = 1;
    repeat (2*BIT) @(negedge clk);           // stop bit and idle time
  endtask

  task automatic receive(input logic [7:0] b);
    send_byte(b);
    check(disp_byte === b, $sformatf("display %h, sent %h", disp_byte, b));
    check(seg2hex(seg_hi) == int'(b[7:4]) && seg2hex(seg_lo) == int'(b[3:0]),
          $sformatf("digits show %0d %0d for %h", seg2hex(seg_hi), seg2hex(seg_lo), b));
    check(rx_error === 1'b0, "receiver error");
    if (disp_byte === b) begin
      n_frames++;
      if (b[7]) n_bit7_high++; else n_bit7_low++;
    end
  endtask

  logic [8:0] exp_dst [14] = '{9'h040, 9'h108, 9'h02B, 9'h0B0, 9'h051, 9'h016, 9'h000,
                               9'h040, 9'h108, 9'h02B, 9'h0B0, 9'h189, 9'h000, 9'h008};
  logic [7:0] signature [8] = '{8'h40, 8'hC8, 8'hDD, 8'h85, 8'h5F, 8'h3B, 8'hD9, 8'h08};

  initial begin
    int prev;
    rs232_rx = 1; verify = 0; step = 0;
    clr = 0; #1 clr = 1; #20 clr = 0;
    repeat (5) @(negedge clk);

    // 1. normal reception
    receive(8'h4E);   // 'N'
    receive(8'hC3);
    for (int r = 0; r < 6; r++) receive(8'($urandom));

    // 2. signature read-out
    @(negedge clk); verify = 1;
    prev = 0;
    for (int k = 0; k < 14; k++) begin
      while (code_ready !== 1'b1) @(negedge clk);
      check(pattern_idx === 4'(k), "pattern index");
      check(scan_code === exp_dst[k], $sformatf("step %0d: code %h expected %h", k, scan_code, exp_dst[k]));
      check(seg2hex(seg_hi) == int'(scan_code[7:4]) && seg2hex(seg_lo) == int'(scan_code[3:0]),
            "digits show the code");
      if (scan_code === exp_dst[k]) n_codes++;
      if (pattern_valid) begin
        int d;
        d = int'(scan_code) - prev;
        if (d < 0) d = -d;
        check(n_sig < 8 && d == int'(signature[n_sig]),
              $sformatf("hidden byte %0d read as %h", n_sig, d));
        n_sig++;
      end
      prev = int'(scan_code);
      step = 1;
      @(negedge clk); step = 0;
    end
    repeat (2) @(negedge clk);
    check(verify_done === 1'b1, "read-out did not finish");
    check(n_sig == 8, $sformatf("%0d hidden bytes", n_sig));

    // 3. back to normal mode and receive again
    verify = 0;
    repeat (20) @(negedge clk);
    check(dut.u_rx.state == S0, "receiver not idle after read-out");
    receive(8'h5A);
    receive(8'h99);
    if (disp_byte === 8'h99) n_restore++;

    // 4. glitch right after the request of a frame whose last bit is 1
    fork
      send_byte(8'hF0);
      begin
        wait (dut.rcv_req === 1'b1);
        @(negedge clk); @(negedge clk); rs232_rx = 0;
        @(negedge clk); rs232_rx = 1;
      end
    join
    check(rx_error === 1'b1, "glitch did not raise the error output");
    if (rx_error) n_error++;
    clr = 1; #2 clr = 0;
    repeat (3) @(negedge clk);
    check(rx_error === 1'b0, "clr did not clear the error");
    receive(8'h3C);

    check(n_frames > 0, "frames received");
    check(n_bit7_low > 0, "frame ending with line low");
    check(n_bit7_high > 0, "frame ending with line high");
    check(n_codes == 14, "all path steps read");
    check(n_sig == 8, "signature read");
    check(n_restore > 0, "reception after read-out");
    check(n_error > 0, "error state");
    $display("frames=%0d bit7_low=%0d bit7_high=%0d codes=%0d sig=%0d restore=%0d error=%0d",
             n_frames, n_bit7_low, n_bit7_high, n_codes, n_sig, n_restore, n_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
