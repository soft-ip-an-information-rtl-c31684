// pattern_rom_tb: self-checking test of the detection pattern ROM.
// Compares all 14 words, and one address past the end, with the detection
// path written out here step by step: start-state code, input vector
// {RCV_IN, RCV_ACK, counter1, counter2, counter3} with don't-cares as 0,
// and the valid bit.
module pattern_rom_tb;
  import sde_pkg::*;
  logic [3:0] addr;
  pattern_t   pattern;
  int checks = 0, failures = 0;

  pattern_rom dut (.addr(addr), .pattern(pattern));

  logic [8:0] exp_code [14] = '{9'h000, 9'h040, 9'h108, 9'h02B, 9'h0B0, 9'h051, 9'h016,
                                9'h000, 9'h040, 9'h108, 9'h02B, 9'h0B0, 9'h189, 9'h000};
  logic [4:0] exp_in [14]   = '{5'b10000, 5'b00000, 5'b00100, 5'b00010, 5'b00001, 5'b10000, 5'b11000,
                                5'b10000, 5'b00000, 5'b00100, 5'b00010, 5'b10001, 5'b11000, 5'b01000};
  logic       exp_v [14]    = '{1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 1, 0, 1};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 14; i++) begin
      addr = 4'(i); #1;
      checks++;
      if (pattern.start_code !== exp_code[i] || pattern.inputs !== exp_in[i] ||
          pattern.valid !== exp_v[i]) begin
        failures++;
        $display("word %0d: %h %b %b", i, pattern.start_code, pattern.inputs, pattern.valid);
      end
    end
    addr = 4'd14; #1;
    checks++; if (pattern !== '0) begin failures++; $display("word 14 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
