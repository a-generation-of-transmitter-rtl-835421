// tb_figure_waveforms -- checks the transmitter at its default parameters
// against hand-computed samples for the reference cases of the design:
//
//  * data 0000 / 0001 (byte 0x01): s1 = 0 deg, s2 = 22.5 deg, both antennas,
//    both slots, samples 0 and 8 (a quarter carrier period later);
//  * the first slot-1 samples of a few symbols: antenna 1 I starting at
//    202.5 deg (s1 = 1001), antenna 2 I starting at 180 deg (s2 = 1000) and
//    antenna 1 Q starting at 90 deg (s1 = 0100).
//
// With A = 2047 (12-bit full scale): A*cos(22.5) = 1891.2 -> 1891 and
// A*sin(22.5) = 783.4 -> 783. The expected values below are written out by
// hand from those two numbers and the Alamouti code, not computed.
module tb_figure_waveforms;
  import stbc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] ch1_i, ch1_q, ch2_i, ch2_q;
  logic ch1_valid, ch2_valid, frame_start;
  byte_t  tx_data;
  slot_e  tx_slot;
  phase_t tx_idx;

  stbc_tx_top dut (.*);

  always #5 clk = ~clk;

  task automatic expect_iq(string what, logic signed [11:0] gi, logic signed [11:0] gq,
                          int ei, int eq);
    checks++;
    if (int'(gi) != ei || int'(gq) != eq) begin
      failures++;
      $display("FAIL %s: got (%0d,%0d) expected (%0d,%0d)", what, gi, gq, ei, eq);
    end
  endtask

  // wait for the output sample (slot, idx) of the frame carrying byte b
  task automatic wait_sample(int b, int slot, int idx);
    do begin @(posedge clk); #1; end while (!(frame_start && tx_data == byte_t'(b)));
    do begin @(posedge clk); #1; end
      while (!(ch1_valid && int'(tx_slot) == slot && int'(tx_idx) == idx));
  endtask

  int base;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // byte 0x01: s1 = 0000 (0 deg), s2 = 0001 (22.5 deg)
    base = 1;
    wait_sample(base, 0, 0);
    expect_iq("0x01 ch1 slot1 n0 (s1)",   ch1_i, ch1_q,  2047,    0);
    expect_iq("0x01 ch2 slot1 n0 (s2)",   ch2_i, ch2_q,  1891,  783);
    repeat (8) @(posedge clk); #1;
    expect_iq("0x01 ch1 slot1 n8",        ch1_i, ch1_q,     0, 2047);
    expect_iq("0x01 ch2 slot1 n8",        ch2_i, ch2_q,  -783, 1891);
    repeat (24) @(posedge clk); #1;       // slot 2, sample 0
    expect_iq("0x01 ch1 slot2 n0 (-s2*)", ch1_i, ch1_q, -1891,  783);
    expect_iq("0x01 ch2 slot2 n0 (s1*)",  ch2_i, ch2_q,  2047,    0);
    repeat (8) @(posedge clk); #1;
    expect_iq("0x01 ch1 slot2 n8 (-s2*)", ch1_i, ch1_q,   783, 1891);
    expect_iq("0x01 ch2 slot2 n8 (s1*)",  ch2_i, ch2_q,     0, -2047);
    // byte 0x48: s1 = 0100 (90 deg), s2 = 1000 (180 deg)
    wait_sample(8'h48, 0, 0);
    expect_iq("0x48 ch1 Q starts at 90 deg",  ch1_i, ch1_q,     0, 2047);
    expect_iq("0x48 ch2 I starts at 180 deg", ch2_i, ch2_q, -2047,    0);
    // byte 0x98: s1 = 1001 (202.5 deg)
    wait_sample(8'h98, 0, 0);
    expect_iq("0x98 ch1 I starts at 202.5 deg", ch1_i, ch1_q, -1891, -783);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
