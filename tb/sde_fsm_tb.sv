// sde_fsm_tb: self-checking test of the encoded control FSM.
//
// Part 1 (UART control table, default parameters): for each of the nine
// state codes and two unused codes, and for all 32 input vectors, scans the
// code in through the scan chain, checks the scan-in landed, applies the
// inputs, checks the Mealy outputs, clocks once and checks the next state
// both on the parallel state output and by scanning it out serially. The
// expected values come from a reference written as a case statement over
// the state graph, separately from the product-term tables. It also checks
// that the code differences along the signature path are the eight hidden
// bytes 40 C8 DD 85 5F 3B D9 08.
//
// Part 2: the same module with a 3-state, 1-input example table (101 goes
// to 011 on input 1, 011 goes to 101 on input 0, both with output 1),
// checking next state, output and reset code.
module sde_fsm_tb;
  import sde_pkg::*;

  logic clk = 1'b0, clr;
  logic scan_en, scan_in, scan_out;
  fsm_in_t in;
  fsm_out_t out;
  code_t state;
  int checks = 0, failures = 0;

  sde_fsm dut (.clk(clk), .clr(clr), .scan_en(scan_en), .scan_in(scan_in),
               .scan_out(scan_out), .in(in), .out(out), .state(state));

  // small example machine
  logic         e_scan_out;
  logic   [0:0] e_in;
  logic   [0:0] e_out;
  logic   [2:0] e_state;
  logic         e_scan_en, e_scan_in;
  sde_fsm #(
    .SW(3), .NI(1), .NO(1), .NE(2),
    .RESET_CODE(3'b101),
    .SRC ({3'b011, 3'b101}),
    .DST ({3'b101, 3'b011}),
    .CARE({1'b1, 1'b1}),
    .VAL ({1'b0, 1'b1}),
    .OUTV({1'b1, 1'b1})
  ) ex (.clk(clk), .clr(clr), .scan_en(e_scan_en), .scan_in(e_scan_in),
        .scan_out(e_scan_out), .in(e_in), .out(e_out), .state(e_state));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: next state and outputs from the state graph.
  // in = {RCV_IN, RCV_ACK, counter1, counter2, counter3}
  // out = {shift1, load1, shift2, load2, shift3, load3, RCV_REQ, ERROR}
  function automatic void ref_step(input code_t s, input fsm_in_t i,
                                   output code_t ns, output fsm_out_t o);
    logic rin, ack, c1, c2, c3;
    {rin, ack, c1, c2, c3} = i;
    ns = 9'h000; o = 8'h00;            // uncovered: all terms 0
    case (s)
      S0: if (rin)       begin ns = S0; o = 8'b01010100; end
          else if (!ack) begin ns = S1; o = 8'b00000000; end
      S1: if (c1) begin ns = S2; o = 8'b10100000; end
          else    begin ns = S1; o = 8'b10000000; end
      S2: if (c2) begin ns = S3; o = 8'b10011000; end
          else    begin ns = S2; o = 8'b10100000; end
      S3: if (!c3)     begin ns = S2; o = 8'b10100000; end
          else if (rin) begin ns = S6; o = 8'b00001010; end
          else          begin ns = S4; o = 8'b00001010; end
      S4: begin ns = rin ? S5 : S4; o = 8'b00000010; end
      S5: if (!rin)     begin ns = S7; o = 0; end
          else if (ack) begin ns = S8; o = 0; end
          else          begin ns = S5; o = 8'b00000010; end
      S6: if (!rin)     begin ns = S7; o = 0; end
          else if (ack) begin ns = S8; o = 0; end
          else          begin ns = S6; o = 8'b00000010; end
      S7: begin ns = S7; o = 8'b00000001; end
      S8: if (rin) ns = ack ? S8 : S0;
          else     ns = ack ? S7 : S8;
      default: ;
    endcase
  endfunction

  task automatic scan_load(input code_t c);
    for (int b = STATE_W-1; b >= 0; b--) begin
      @(negedge clk); scan_en = 1; scan_in = c[b];
    end
    @(negedge clk); scan_en = 0;
  endtask

  task automatic scan_read(output code_t c);
    c = '0;
    @(negedge clk); scan_en = 1; scan_in = 0;
    for (int b = 0; b < STATE_W; b++) begin
      @(posedge clk); c = {c[STATE_W-2:0], scan_out};
      #1;
    end
    @(negedge clk); scan_en = 0;
  endtask

  code_t codes [11] = '{S0, S1, S2, S3, S4, S5, S6, S7, S8, 9'h1FF, 9'h0AA};
  code_t ns_ref, got;
  fsm_out_t o_ref;
  byte unsigned hidden [8] = '{8'h40, 8'hC8, 8'hDD, 8'h85, 8'h5F, 8'h3B, 8'hD9, 8'h08};
  code_t hid_a [8] = '{S8, S0, S1, S2, S3, S4, S3, S8};
  code_t hid_b [8] = '{S0, S1, S2, S3, S4, S5, S6, S7};

  initial begin
    scan_en = 0; scan_in = 0; in = '0; clr = 0;
    #1 clr = 1;
    e_scan_en = 0; e_scan_in = 0; e_in = '0;
    #12;
    checks++; if (state !== S8) begin failures++; $display("reset code %h", state); end
    checks++; if (e_state !== 3'b101) begin failures++; $display("example reset %b", e_state); end
    clr = 0;

    // signature bytes in the code differences
    for (int k = 0; k < 8; k++) begin
      int diff;
      diff = int'(hid_a[k]) - int'(hid_b[k]);
      if (diff < 0) diff = -diff;
      checks++;
      if (diff != int'(hidden[k])) begin
        failures++; $display("byte %0d: difference %h expected %h", k, diff, hidden[k]);
      end
    end

    foreach (codes[c]) begin
      for (int i = 0; i < 32; i++) begin
        scan_load(codes[c]);
        checks++;
        if (state !== codes[c]) begin failures++; $display("scan-in %h gave %h", codes[c], state); end
        in = fsm_in_t'(i);
        #1;
        ref_step(codes[c], in, ns_ref, o_ref);
        checks++;
        if (out !== o_ref) begin
          failures++; $display("state %h in %b: out %b expected %b", codes[c], in, out, o_ref);
        end
        @(posedge clk); #1;
        checks++;
        if (state !== ns_ref) begin
          failures++; $display("state %h in %b: next %h expected %h", codes[c], in, state, ns_ref);
        end
        scan_read(got);
        checks++;
        if (got !== ns_ref) begin
          failures++; $display("scan-out %h expected %h", got, ns_ref);
        end
      end
    end

    // example machine, from its reset code
    @(negedge clk); clr = 1; #1; clr = 0;
    checks++; if (e_state !== 3'b101) begin failures++; $display("example reset %b", e_state); end
    e_in = 1'b1; #1;
    checks++; if (e_out !== 1'b1) begin failures++; $display("example p0 output"); end
    @(posedge clk); #1;
    checks++; if (e_state !== 3'b011) begin failures++; $display("example 101->%b", e_state); end
    @(negedge clk); e_in = 1'b1; #1;
    checks++; if (e_out !== 1'b0) begin failures++; $display("example uncovered output"); end
    e_in = 1'b0; #1;
    checks++; if (e_out !== 1'b1) begin failures++; $display("example p1 output"); end
    @(posedge clk); #1;
    checks++; if (e_state !== 3'b101) begin failures++; $display("example 011->%b", e_state); end
    @(negedge clk); e_in = 1'b0;
    @(posedge clk); #1;
    checks++; if (e_state !== 3'b000) begin failures++; $display("example uncovered -> %b", e_state); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
