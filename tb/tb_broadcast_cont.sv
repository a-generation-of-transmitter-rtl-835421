// tb_broadcast_cont -- drives the controller with two modelled channels whose
// ready/active timing is random, and checks: allow only after both channels
// are ready (the controller waits while either is busy), allow held until both
// are active, the data byte constant while allow is high, one counter step per
// frame including the 255 -> 0 wrap, and the one-clock ready -> allow latency.
module tb_broadcast_cont;
  import stbc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] ready = '0, active = '0;
  logic allow, frame_start;
  byte_t data;

  broadcast_cont #(.NUM_CH(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int waits_seen = 0;

  initial begin
    int exp_data;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(!allow, "no allow after reset");
    check(data == 0, "counter starts at 0");
    exp_data = 0;
    for (int f = 0; f < 300; f++) begin
      int d0, d1, a0, a1;
      // channels become ready after independent random delays
      d0 = $urandom_range(0, 5); d1 = $urandom_range(0, 5);
      for (int c = 0; c <= 6; c++) begin
        ready[0] <= (c >= d0);
        ready[1] <= (c >= d1);
        @(posedge clk); #1;
        if (!(c >= d0 && c >= d1)) begin
          check(!allow, "waits while a channel is not ready");
          if (c > 0) waits_seen++;
        end
      end
      // both ready since at least one edge: allow must be up now
      check(allow, "allow one clock after both ready");
      check(data == byte_t'(exp_data), $sformatf("data %0d expected %0d", data, exp_data));
      ready <= '0;
      // channels become active at independent times
      a0 = $urandom_range(0, 3); a1 = $urandom_range(0, 3);
      for (int c = 0; c <= 4; c++) begin
        active[0] <= (c >= a0);
        active[1] <= (c >= a1);
        #1;
        if (c >= a0 && c >= a1) begin
          check(frame_start, "frame_start when both active");
          @(posedge clk); #1;
          check(!allow, "allow dropped after both active");
          break;
        end else begin
          check(!frame_start, "no frame_start before both active");
          @(posedge clk); #1;
          check(allow, "allow held until both active");
          check(data == byte_t'(exp_data), "data held while allow");
        end
      end
      exp_data = (exp_data + 1) % 256;
      check(data == byte_t'(exp_data), "counter advanced by one");
      active <= '0;
    end
    check(waits_seen > 0, "controller had to wait for a channel");
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
