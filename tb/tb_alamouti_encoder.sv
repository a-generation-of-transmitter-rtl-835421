// tb_alamouti_encoder -- exhaustive check of the Alamouti slot selection for
// both antennas. The chosen symbol and flags are turned into the phase of the
// resulting complex point (in 1/32 turns) and compared with the phase that the
// code matrix [s1 s2; -s2* s1*] prescribes.
module tb_alamouti_encoder;
  import stbc_pkg::*;

  int checks = 0, failures = 0;

  sym_t    s1, s2;
  slot_e   slot;
  tx_cmd_t cmd1, cmd2;

  alamouti_encoder #(.CHANNEL(1)) dut1 (.s1(s1), .s2(s2), .slot(slot), .cmd(cmd1));
  alamouti_encoder #(.CHANNEL(2)) dut2 (.s1(s1), .s2(s2), .slot(slot), .cmd(cmd2));

  // phase (1/32 turn) of the point a command describes
  function automatic int cmd_phase(tx_cmd_t c);
    int p;
    p = 2 * int'(c.sym);
    if (c.conj) p = -p;
    if (c.neg)  p = p + 16;
    return ((p % 32) + 32) % 32;
  endfunction

  function automatic int wrap(int p);
    return ((p % 32) + 32) % 32;
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s s1=%0d s2=%0d slot=%0d got %0d exp %0d", what, s1, s2, slot, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int t = 0; t < 2; t++) begin
          s1 = sym_t'(a); s2 = sym_t'(b); slot = slot_e'(t);
          #1;
          if (t == 0) begin
            check(cmd_phase(cmd1), wrap(2 * a), "ch1 slot1 = s1");
            check(cmd_phase(cmd2), wrap(2 * b), "ch2 slot1 = s2");
          end else begin
            check(cmd_phase(cmd1), wrap(16 - 2 * b), "ch1 slot2 = -s2*");
            check(cmd_phase(cmd2), wrap(-2 * a), "ch2 slot2 = s1*");
          end
          // the conjugate flag also reverses the carrier rotation
          check(int'(cmd1.conj), t, "ch1 conj");
          check(int'(cmd2.conj), t, "ch2 conj");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
