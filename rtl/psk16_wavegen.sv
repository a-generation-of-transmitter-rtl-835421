// psk16_wavegen -- 16-PSK symbol mapper and I/Q sample generator.
//
// For each clock with `en` high it outputs one I/Q sample of a carrier whose
// period is one time slot (32 samples), started at the phase of the 16-PSK
// symbol:
//
//   theta(n) = 2*pi * (2*sym + n) / 32          (sym 0..15 -> 0..337.5 deg)
//   I = A*cos(theta), Q = A*sin(theta),  A = 2^(DAC_W-1) - 1  (DAC full scale)
//
// The mapping is natural binary: symbol k sits at k x 22.5 degrees. The
// Alamouti flags are then applied: conj negates Q (s*), neg negates I and Q
// (-s). The sine values come from a 9-entry quarter-wave table,
// round(A*sin(k*pi/16)) for k = 0..8, computed at elaboration; the other three
// quadrants are read from it by symmetry.
//
// Timing: one cycle. The sample for (cmd, n) presented with `en` appears on
// i_out/q_out with `valid` on the next clock. With `en` low the outputs are 0.
// Reset (rst_n low, synchronous) clears the outputs.
//
// The 32 samples per slot, the 16 phases from 0 to 337.5 degrees and the use of
// the full DAC range follow the design description; the table form, DAC_W and
// the one-cycle register are this design's own choices.
module psk16_wavegen
  import stbc_pkg::*;
#(
  parameter int unsigned DAC_W = 12   // signed sample width at the DAC port
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,     // produce a sample this cycle
  input  tx_cmd_t                 cmd,    // symbol and Alamouti flags
  input  phase_t                  n,      // sample index within the slot
  output logic signed [DAC_W-1:0] i_out,
  output logic signed [DAC_W-1:0] q_out,
  output logic                    valid
);

  typedef logic signed [DAC_W-1:0] samp_t;

  // round(A * sin(k*pi/16)), A = DAC full scale; evaluated only at elaboration.
  function automatic samp_t qsin(int k);
    real a;
    a = real'((1 << (DAC_W - 1)) - 1) * $sin(3.14159265358979 * real'(k) / 16.0);
    return samp_t'(int'(a));
  endfunction

  localparam samp_t QTAB [0:8] = '{qsin(0), qsin(1), qsin(2), qsin(3), qsin(4),
                                   qsin(5), qsin(6), qsin(7), qsin(8)};

  // A*sin(2*pi*p/32) from the quarter table.
  function automatic samp_t sin32(phase_t p);
    logic [3:0] idx;
    samp_t      v;
    idx = p[3] ? 4'(4'd8 - {1'b0, p[2:0]}) : {1'b0, p[2:0]};
    v   = QTAB[idx];
    return p[4] ? -v : v;
  endfunction

  phase_t theta;
  samp_t  i_raw, q_raw, i_nxt, q_nxt;

  always_comb begin
    theta = phase_t'({cmd.sym, 1'b0}) + n;         // symbol phase + carrier advance
    i_raw = sin32(theta + phase_t'(8));           // cos = sin shifted by 90 deg
    q_raw = sin32(theta);
    i_nxt = cmd.neg ? -i_raw : i_raw;
    q_nxt = (cmd.neg ^ cmd.conj) ? -q_raw : q_raw;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
      valid <= 1'b0;
    end else begin
      i_out <= en ? i_nxt : '0;
      q_out <= en ? q_nxt : '0;
      valid <= en;
    end
  end

endmodule
