// tb_psk16_wavegen -- checks every symbol, sample index and Alamouti flag
// combination of the 16-PSK sample generator against floating-point cos/sin,
// the one-cycle latency and the zero output when not enabled.
module tb_psk16_wavegen;
  import stbc_pkg::*;
  import stbc_ref_pkg::*;

  localparam int W = 12;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  tx_cmd_t cmd = '0;
  phase_t  n = '0;
  logic signed [W-1:0] i_out, q_out;
  logic valid;

  psk16_wavegen #(.DAC_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int ei, eq;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(int'(valid), 0, "valid after reset");
    for (int k = 0; k < 16; k++)
      for (int f = 0; f < 4; f++)
        for (int s = 0; s < 32; s++) begin
          en  <= 1;
          cmd <= '{sym: sym_t'(k), conj: f[0], neg: f[1]};
          n   <= phase_t'(s);
          @(posedge clk);   // sample registered on this edge
          en  <= 0;
          #1;
          ei = ref_cos(k, s, W);
          eq = ref_sin(k, s, W);
          if (f[0]) eq = -eq;
          if (f[1]) begin ei = -ei; eq = -eq; end
          check(int'(valid), 1, "valid one cycle after en");
          check(int'(i_out), ei, $sformatf("I k=%0d f=%0d n=%0d", k, f, s));
          check(int'(q_out), eq, $sformatf("Q k=%0d f=%0d n=%0d", k, f, s));
          @(posedge clk);   // en low: outputs return to zero
          #1;
          if (s == 0) begin
            check(int'(valid), 0, "valid low");
            check(int'(i_out), 0, "I zero when idle");
            check(int'(q_out), 0, "Q zero when idle");
          end
        end
    // full scale reached: symbol 0 at n = 0 is A + j0; symbol 4 at n = 0 is 0 + jA
    en <= 1; cmd <= '{sym: 4'd0, conj: 1'b0, neg: 1'b0}; n <= '0;
    @(posedge clk); #1;
    check(int'(i_out), amp(W), "full-scale I");
    en <= 1; cmd <= '{sym: 4'd4, conj: 1'b0, neg: 1'b0}; n <= '0;
    @(posedge clk); #1;
    check(int'(q_out), amp(W), "full-scale Q");
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
