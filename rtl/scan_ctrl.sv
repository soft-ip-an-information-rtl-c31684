// scan_ctrl: scan-chain control circuit of the verification board.
//
// Two jobs, chosen by the verify input:
//
// Normal mode (verify = 0): consumer of the UART receiver. When rcv_req is
// high it copies the received byte to the display register and raises
// rcv_ack; it drops rcv_ack once rcv_req has fallen (four-phase handshake).
//
// Verify mode (verify = 1): reads the hidden signature out of the control
// FSM through its scan chain, one path step at a time:
//   LOAD     read pattern idx from the pattern ROM
//   SCAN_IN  SW clocks with scan_en = 1, shifting the start-state code in,
//            MSB first
//   STEP     one functional clock with test_mode = 1 and the pattern's
//            input vector on test_in: the FSM takes exactly that edge
//   SCAN_OUT SW clocks with scan_en = 1, shifting the destination code
//            out, MSB first, into code_out
//   SHOW     code_out is displayed (low byte) and code_ready is high until
//            a one-clock step pulse moves on to the next pattern
// After the last pattern it sits in DONE (verify_done = 1). When verify
// falls it scans the reset-state code into the FSM (RESTORE) and returns
// to normal mode. The differences between consecutive displayed codes on
// steps whose valid bit is 1 are the signature bytes; the circuit does not
// compute them.
//
// Timing: one pattern takes 1 + SW + 1 + SW clocks (20 for SW = 9) from
// LOAD to SHOW. The ROM-driven scan-in / one step / scan-out sequence and
// the display of the state code follow the design; the step button, the
// handshake in normal mode and the restore scan are this design's choices.
module scan_ctrl #(
  parameter int unsigned SW    = sde_pkg::STATE_W,
  parameter int unsigned DEPTH = sde_pkg::PATH_LEN,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              verify,
  input  logic              step,
  // UART receiver, normal side
  input  logic              rcv_req,
  output logic              rcv_ack,
  input  logic [7:0]        rx_data,
  // UART receiver, test side
  output logic              scan_en,
  output logic              scan_in,
  input  logic              scan_out,
  output logic              test_mode,
  output sde_pkg::fsm_in_t  test_in,
  // pattern ROM
  output logic [AW-1:0]     rom_addr,
  input  sde_pkg::pattern_t pattern,
  // display and status
  output logic [7:0]        disp,
  output logic [SW-1:0]     code_out,
  output logic              code_ready,
  output logic              pattern_valid,
  output logic              verify_done
);

  typedef enum logic [2:0] {
    NORMAL, LOAD, SCAN_IN, STEP, SCAN_OUT, SHOW, DONE, RESTORE
  } st_t;

  st_t                    st;
  logic [AW-1:0]          idx;
  logic [$clog2(SW)-1:0]  cnt;
  logic [SW-1:0]          shreg;   // code being scanned in
  logic                   cur_valid;

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      st        <= NORMAL;
      idx       <= '0;
      cnt       <= '0;
      shreg     <= '0;
      code_out  <= '0;
      disp      <= '0;
      rcv_ack   <= 1'b0;
      cur_valid <= 1'b0;
    end else begin
      unique case (st)
        NORMAL: begin
          if (rcv_req && !rcv_ack) begin
            disp    <= rx_data;
            rcv_ack <= 1'b1;
          end else if (!rcv_req && rcv_ack) begin
            rcv_ack <= 1'b0;
          end else if (verify && !rcv_ack && !rcv_req) begin
            idx <= '0;
            st  <= LOAD;
          end
        end
        LOAD: begin
          shreg     <= pattern.start_code;
          cur_valid <= pattern.valid;
          cnt       <= '0;
          st        <= SCAN_IN;
        end
        SCAN_IN: begin
          shreg <= shreg << 1;
          cnt   <= cnt + 1'b1;
          if (32'(cnt) == SW-1) st <= STEP;
        end
        STEP: begin
          cnt <= '0;
          st  <= SCAN_OUT;
        end
        SCAN_OUT: begin
          code_out <= {code_out[SW-2:0], scan_out};
          cnt      <= cnt + 1'b1;
          if (32'(cnt) == SW-1) begin
            disp <= {code_out[6:0], scan_out};  // low byte of the new code
            st   <= SHOW;
          end
        end
        SHOW: begin
          if (step) begin
            if (32'(idx) == DEPTH-1) begin
              st <= DONE;
            end else begin
              idx <= idx + 1'b1;
              st  <= LOAD;
            end
          end
        end
        DONE: begin
          if (!verify) begin
            shreg <= sde_pkg::RESET_CODE;
            cnt   <= '0;
            st    <= RESTORE;
          end
        end
        RESTORE: begin
          shreg <= shreg << 1;
          cnt   <= cnt + 1'b1;
          if (32'(cnt) == SW-1) st <= NORMAL;
        end
        default: st <= NORMAL;
      endcase
    end
  end

  always_comb begin
    scan_en   = (st == SCAN_IN) || (st == SCAN_OUT) || (st == RESTORE);
    scan_in   = ((st == SCAN_IN) || (st == RESTORE)) ? shreg[SW-1] : 1'b0;
    test_mode = (st != NORMAL);
    test_in   = (st == STEP) ? pattern.inputs : '0;
  end

  // The scan chain is only shifted while the receiver is in test mode.
  a_scan_in_test: assert property (@(posedge clk) disable iff (clr) scan_en |-> test_mode);

  assign rom_addr      = idx;
  assign code_ready    = (st == SHOW);
  assign pattern_valid = cur_valid;
  assign verify_done   = (st == DONE);

endmodule
