// scan_ctrl_tb: self-checking test of the scan-chain control circuit.
//
// The receiver is replaced by a small model: a 9-bit scan chain (bit 0 in,
// bit 8 out) whose functional step follows the 14 edges of the detection
// path, plus a request/data source. The test checks the normal-mode
// handshake and display, then walks the whole path in verify mode: at each
// displayed code it checks the code, the displayed byte, the step index and
// valid bit, and that the code appears 20 clocks after the step pulse
// (1 load + 9 scan-in + 1 step + 9 scan-out). From the displayed codes
// alone it recomputes the signature bytes of the valid steps and compares
// them with 40 C8 DD 85 5F 3B D9 08. Finally it checks that leaving verify
// mode scans the reset code back in.
module scan_ctrl_tb;
  import sde_pkg::*;

  logic clk = 1'b0, clr, verify, step;
  logic rcv_req, rcv_ack;
  logic [7:0] rx_data, disp;
  logic scan_en, scan_in, scan_out, test_mode, code_ready, pattern_valid, verify_done;
  fsm_in_t test_in;
  logic [3:0] rom_addr;
  pattern_t pattern;
  code_t code_out;
  int checks = 0, failures = 0;

  scan_ctrl dut (
    .clk(clk), .clr(clr), .verify(verify), .step(step),
    .rcv_req(rcv_req), .rcv_ack(rcv_ack), .rx_data(rx_data),
    .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out),
    .test_mode(test_mode), .test_in(test_in),
    .rom_addr(rom_addr), .pattern(pattern),
    .disp(disp), .code_out(code_out), .code_ready(code_ready),
    .pattern_valid(pattern_valid), .verify_done(verify_done));

  pattern_rom u_rom (.addr(rom_addr), .pattern(pattern));

  // scan-chain model of the control FSM, path edges only
  logic [8:0] chain;
  function automatic logic [8:0] path_next(input logic [8:0] s, input logic [4:0] i);
    case ({s, i})
      {9'h000, 5'b10000}: return 9'h040;
      {9'h040, 5'b00000}: return 9'h108;
      {9'h108, 5'b00100}: return 9'h02B;
      {9'h02B, 5'b00010}: return 9'h0B0;
      {9'h0B0, 5'b00001}: return 9'h051;
      {9'h051, 5'b10000}: return 9'h016;
      {9'h016, 5'b11000}: return 9'h000;
      {9'h0B0, 5'b10001}: return 9'h189;
      {9'h189, 5'b11000}: return 9'h000;
      {9'h000, 5'b01000}: return 9'h008;
      default:            return 9'h1FF;
    endcase
  endfunction
  always_ff @(posedge clk) begin
    if (scan_en)        chain <= {chain[7:0], scan_in};
    else if (test_mode) chain <= path_next(chain, test_in);
  end
  assign scan_out = chain[8];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [8:0] exp_dst [14] = '{9'h040, 9'h108, 9'h02B, 9'h0B0, 9'h051, 9'h016, 9'h000,
                               9'h040, 9'h108, 9'h02B, 9'h0B0, 9'h189, 9'h000, 9'h008};
  logic       exp_v [14]   = '{1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 1, 0, 1};
  logic [7:0] signature [8] = '{8'h40, 8'hC8, 8'hDD, 8'h85, 8'h5F, 8'h3B, 8'hD9, 8'h08};

  initial begin
    int prev, nsig, wait_cycles;
    verify = 0; step = 0; rcv_req = 0; rx_data = '0; chain = 9'h000;
    clr = 0; #1 clr = 1; #20 clr = 0;

    // normal mode: two handshakes
    for (int r = 0; r < 2; r++) begin
      logic [7:0] b;
      b = 8'($urandom);
      @(negedge clk); rcv_req = 1; rx_data = b;
      @(negedge clk);
      check(rcv_ack === 1'b1, "rcv_ack not raised");
      check(disp === b, "received byte not displayed");
      check(test_mode === 1'b0 && scan_en === 1'b0, "test signals active in normal mode");
      rcv_req = 0; rx_data = ~b;
      @(negedge clk);
      check(rcv_ack === 1'b0, "rcv_ack not dropped");
      check(disp === b, "display changed");
    end

    // verify mode
    @(negedge clk); verify = 1;
    prev = 0; nsig = 0;
    for (int k = 0; k < 14; k++) begin
      wait_cycles = 0;
      while (code_ready !== 1'b1) begin
        @(posedge clk); #1; wait_cycles++;
      end
      if (k > 0) check(wait_cycles == 20, $sformatf("step %0d took %0d clocks", k, wait_cycles));
      check(code_out === exp_dst[k], $sformatf("step %0d code %h expected %h", k, code_out, exp_dst[k]));
      check(rom_addr === 4'(k), "pattern index");
      check(pattern_valid === exp_v[k], "valid bit");
      @(negedge clk);
      check(disp === code_out[7:0], "display of code");
      if (pattern_valid) begin
        int d;
        d = int'(code_out) - prev;
        if (d < 0) d = -d;
        check(nsig < 8 && d == int'(signature[nsig]), $sformatf("signature byte %0d = %h", nsig, d));
        nsig++;
      end
      prev = int'(code_out);
      step = 1;
      @(negedge clk); step = 0;
    end
    check(nsig == 8, "eight signature bytes");
    repeat (2) @(negedge clk);
    check(verify_done === 1'b1, "verify_done");
    verify = 0;
    repeat (12) @(negedge clk);
    check(chain === 9'h000, $sformatf("reset code not restored: %h", chain));
    check(test_mode === 1'b0, "back to normal mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
