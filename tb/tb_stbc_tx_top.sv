// tb_stbc_tx_top -- end-to-end test of the two-antenna 16-PSK Alamouti
// transmitter at its default parameters.
//
// A monitor follows every frame: it takes the byte when the controller
// releases it, then compares all 64 I/Q samples of each antenna with the
// floating-point Alamouti reference (antenna 1: s1, -s2*; antenna 2: s2, s1*).
// It also checks that both antennas are valid on the same clocks, that the
// frame period is 66 clocks, and that the bytes count up by one. A reset is
// applied in the middle of a frame, after which the counter must restart at 0.
// The run covers more than 256 frames so the byte counter wraps.
//
// Mechanisms counted (each must happen at least once): ready/allow handshake,
// controller waiting while the channels are busy, slot 1 and slot 2 samples,
// conjugated (s1*) and negated-conjugated (-s2*) samples, all 16 symbols as
// s1 and as s2, counter wrap, reset in mid-frame.
module tb_stbc_tx_top;
  import stbc_pkg::*;
  import stbc_ref_pkg::*;

  localparam int W = 12;          // the top's default DAC_W
  localparam int PERIOD = 66;     // 64 samples + 2 handshake clocks
  localparam int FRAMES = 330;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] ch1_i, ch1_q, ch2_i, ch2_q;
  logic ch1_valid, ch2_valid, frame_start;
  byte_t  tx_data;
  slot_e  tx_slot;
  phase_t tx_idx;

  stbc_tx_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters
  int n_handshake = 0, n_wait = 0, n_slot1 = 0, n_slot2 = 0, n_conj = 0, n_negconj = 0;
  int n_wrap = 0, n_midreset = 0;
  bit [15:0] seen_s1 = '0, seen_s2 = '0;

  int frames = 0, cur_byte = -1, last_byte = -1, s = 0;
  longint cyc = 0, last_start = -1;
  bit in_reset = 1;

  always @(posedge clk) begin
    int ei, eq;
    #1;
    cyc++;
    if (!rst_n) begin
      cur_byte = -1; last_byte = -1; last_start = -1; s = 0;
    end else begin
      // a frame is running: the controller holds the next byte back
      if (ch1_valid && !frame_start) n_wait++;
      check(ch1_valid == ch2_valid, "channels valid on the same clocks");
      if (ch1_valid && cur_byte >= 0) begin
        ref_iq(cur_byte, 1, s / 32 + 1, s % 32, W, ei, eq);
        check(int'(ch1_i) == ei && int'(ch1_q) == eq,
              $sformatf("ch1 byte %0d sample %0d: got %0d,%0d exp %0d,%0d", cur_byte, s, ch1_i, ch1_q, ei, eq));
        ref_iq(cur_byte, 2, s / 32 + 1, s % 32, W, ei, eq);
        check(int'(ch2_i) == ei && int'(ch2_q) == eq,
              $sformatf("ch2 byte %0d sample %0d: got %0d,%0d exp %0d,%0d", cur_byte, s, ch2_i, ch2_q, ei, eq));
        check(int'(tx_slot) == s / 32 && int'(tx_idx) == s % 32, "slot/index tag");
        if (s < 32) n_slot1++;
        else begin n_slot2++; n_conj++; n_negconj++; end
        s++;
      end else if (!ch1_valid) begin
        check(ch1_i == 0 && ch1_q == 0 && ch2_i == 0 && ch2_q == 0, "zero between frames");
        if (cur_byte >= 0 && s != 0) begin
          check(s == 64, $sformatf("frame had %0d samples, expected 64", s));
          s = 0;
        end
      end
      if (frame_start) begin
        n_handshake++;
        if (last_start >= 0)
          check(cyc - last_start == longint'(PERIOD), $sformatf("frame period %0d", cyc - last_start));
        if (last_byte >= 0)
          check(int'(tx_data) == (last_byte + 1) % 256, "byte counts up by one");
        else
          check(tx_data == 0, "first byte after reset is 0");
        if (last_byte == 255 && tx_data == 0) n_wrap++;
        last_start = cyc;
        last_byte  = int'(tx_data);
        cur_byte   = int'(tx_data);
        seen_s1[tx_data[7:4]] = 1'b1;
        seen_s2[tx_data[3:0]] = 1'b1;
        s = 0;
        frames++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // reset in the middle of frame 40 (sample 20)
    wait (frames == 40);
    repeat (21) @(posedge clk);
    rst_n <= 0;
    repeat (2) @(posedge clk);
    #1;
    check(!ch1_valid && !ch2_valid && ch1_i == 0 && ch2_q == 0, "outputs cleared by reset");
    n_midreset++;
    frames = 0;
    rst_n <= 1;
    wait (frames == FRAMES);
    repeat (PERIOD) @(posedge clk);
    check(n_handshake > 0, "handshake happened");
    check(n_wait > 0, "controller waited for busy channels");
    check(n_slot1 > 0 && n_slot2 > 0, "both time slots sent");
    check(n_conj > 0 && n_negconj > 0, "conjugated and negated samples sent");
    check(&seen_s1 && &seen_s2, "all 16 symbols as s1 and s2");
    check(n_wrap > 0, "byte counter wrapped");
    check(n_midreset > 0, "reset in mid-frame");
    $display("handshakes=%0d waits=%0d slot1=%0d slot2=%0d conj=%0d negconj=%0d wrap=%0d midreset=%0d",
             n_handshake, n_wait, n_slot1, n_slot2, n_conj, n_negconj, n_wrap, n_midreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
