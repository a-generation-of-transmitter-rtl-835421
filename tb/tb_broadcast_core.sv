// tb_broadcast_core -- runs both channel variants of the baseband processor
// side by side. A behavioural controller gives `allow` after a random delay
// (so the core must wait in PREPARE), with a random byte. Checks: the reset ->
// INITIALIZE -> PREPARE sequence, ready/active, exactly 64 consecutive valid
// samples per frame (32 per slot), every I/Q sample against the floating-point
// Alamouti reference, the slot/index tags, and the return to PREPARE.
module tb_broadcast_core;
  import stbc_pkg::*;
  import stbc_ref_pkg::*;

  localparam int W = 12;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, allow = 0;
  byte_t data = '0;

  logic ready1, active1, valid1, ready2, active2, valid2;
  logic signed [W-1:0] i1, q1, i2, q2;
  slot_e  slot1, slot2;
  phase_t idx1, idx2;

  broadcast_core #(.CHANNEL(1), .DAC_W(W)) dut1 (
    .clk, .rst_n, .allow, .data, .ready(ready1), .active(active1),
    .i_out(i1), .q_out(q1), .valid(valid1), .slot_out(slot1), .idx_out(idx1));
  broadcast_core #(.CHANNEL(2), .DAC_W(W)) dut2 (
    .clk, .rst_n, .allow, .data, .ready(ready2), .active(active2),
    .i_out(i2), .q_out(q2), .valid(valid2), .slot_out(slot2), .idx_out(idx2));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int ei, eq, d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;   // RESET -> INIT
    check(!ready1 && !active1, "not ready in INITIALIZE");
    @(posedge clk); #1;   // INIT -> PREPARE
    check(ready1 && ready2, "ready in PREPARE after reset and initialize");
    for (int f = 0; f < 40; f++) begin
      int gap;
      d = (f < 16) ? (f * 17) : int'($urandom_range(0, 255));
      gap = $urandom_range(0, 6);
      repeat (gap) begin
        @(posedge clk); #1;
        check(ready1 && ready2 && !active1 && !valid1, "waits in PREPARE without allow");
      end
      allow <= 1; data <= byte_t'(d);
      @(posedge clk); #1;
      allow <= 0; data <= byte_t'($urandom);   // byte must have been latched
      check(active1 && active2 && !ready1, "ACTIVE after allow");
      for (int s = 0; s < 64; s++) begin
        @(posedge clk); #1;
        check(valid1 && valid2, "valid throughout the frame");
        check(int'(slot1) == s / 32 && int'(idx1) == s % 32, "slot/index tag");
        ref_iq(d, 1, s / 32 + 1, s % 32, W, ei, eq);
        check(int'(i1) == ei && int'(q1) == eq,
              $sformatf("ch1 d=%0d s=%0d got %0d,%0d exp %0d,%0d", d, s, i1, q1, ei, eq));
        ref_iq(d, 2, s / 32 + 1, s % 32, W, ei, eq);
        check(int'(i2) == ei && int'(q2) == eq,
              $sformatf("ch2 d=%0d s=%0d got %0d,%0d exp %0d,%0d", d, s, i2, q2, ei, eq));
        if (s == 62) check(active1, "still active before last sample");
      end
      check(ready1 && ready2 && !active1, "back in PREPARE after 64 samples");
      @(posedge clk); #1;
      check(!valid1 && i1 == 0 && q1 == 0, "idle outputs zero between frames");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
