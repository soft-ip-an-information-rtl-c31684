// sde_board_top: watermarked UART receiver with its signature reader.
//
// The whole board-level design: a serial line (RS-232 level, 8 clocks per
// bit) enters uart_rx, whose control FSM hides an encrypted 64-bit
// signature in the differences of its 9-bit state codes. scan_ctrl either
// acknowledges received bytes and shows them on two seven-segment digits
// (verify = 0), or walks the 14-step detection path from pattern_rom:
// scan a start state in, clock the FSM once with the stored inputs, scan
// the reached state out and show its low byte (verify = 1, step advances).
//
// Ports: rs232_rx is the serial input; seg_hi/seg_lo are the two digits
// ({g,f,e,d,c,b,a}, active high). The other outputs expose what the display
// shows, for a tester: scan_code is the full scanned-out code, code_ready
// marks a code on display, pattern_idx/pattern_valid identify the path step
// and its valid bit, verify_done ends the walk, rx_error is the receiver's
// error output. clr is an asynchronous active-high reset.
//
// The block structure (receiver, scan-chain control circuit, pattern ROM,
// seven-segment display) follows the verification setup of the design; the
// step button, the exposed status outputs and the ROM-to-controller wiring
// are this design's choices.
module sde_board_top (
  input  logic                 clk,
  input  logic                 clr,
  input  logic                 rs232_rx,
  input  logic                 verify,
  input  logic                 step,
  output logic [6:0]           seg_hi,
  output logic [6:0]           seg_lo,
  output logic                 rx_error,
  output logic [7:0]           disp_byte,
  output sde_pkg::code_t       scan_code,
  output logic                 code_ready,
  output logic [3:0]           pattern_idx,
  output logic                 pattern_valid,
  output logic                 verify_done
);
  import sde_pkg::*;

  logic     rcv_req, rcv_ack;
  logic [7:0] rx_data;
  logic     scan_en, scan_in, scan_out, test_mode;
  fsm_in_t  test_in;
  code_t    fsm_state;
  pattern_t pattern;
  logic [3:0] rom_addr;

  uart_rx u_rx (
    .clk       (clk),
    .clr       (clr),
    .rcv_in    (rs232_rx),
    .rcv_ack   (rcv_ack),
    .rcv_req   (rcv_req),
    .error     (rx_error),
    .data      (rx_data),
    .scan_en   (scan_en),
    .scan_in   (scan_in),
    .scan_out  (scan_out),
    .test_mode (test_mode),
    .test_in   (test_in),
    .state     (fsm_state)
  );

  pattern_rom u_rom (
    .addr    (rom_addr),
    .pattern (pattern)
  );

  scan_ctrl u_ctrl (
    .clk           (clk),
    .clr           (clr),
    .verify        (verify),
    .step          (step),
    .rcv_req       (rcv_req),
    .rcv_ack       (rcv_ack),
    .rx_data       (rx_data),
    .scan_en       (scan_en),
    .scan_in       (scan_in),
    .scan_out      (scan_out),
    .test_mode     (test_mode),
    .test_in       (test_in),
    .rom_addr      (rom_addr),
    .pattern       (pattern),
    .disp          (disp_byte),
    .code_out      (scan_code),
    .code_ready    (code_ready),
    .pattern_valid (pattern_valid),
    .verify_done   (verify_done)
  );

  seg7_decoder u_seg_hi (.hex (disp_byte[7:4]), .seg (seg_hi));
  seg7_decoder u_seg_lo (.hex (disp_byte[3:0]), .seg (seg_lo));

  assign pattern_idx = rom_addr;

endmodule
