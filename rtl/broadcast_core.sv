// broadcast_core -- baseband processor of one antenna channel (BroadcastCORE).
//
// State machine (all transitions on the rising clock edge):
//   CORE_RESET   entered on reset; next cycle goes to CORE_INIT.
//   CORE_INIT    clears the slot and sample counters; next cycle CORE_PREPARE.
//   CORE_PREPARE raises `ready` and waits for `allow` from the controller. On
//                allow it latches the data byte (s1 = data[7:4], s2 = data[3:0])
//                and enters CORE_ACTIVE.
//   CORE_ACTIVE  raises `active` and sends two time slots of 32 samples each,
//                one sample per clock, then returns to CORE_PREPARE.
// In each slot the Alamouti encoder chooses the symbol and the conjugate/negate
// flags for this antenna (CHANNEL 1: s1 then -s2*, CHANNEL 2: s2 then s1*) and
// the 16-PSK generator turns them into I/Q samples for the DAC.
//
// Timing: the sample sent in ACTIVE cycle c (c = 0..63) appears on i_out/q_out
// one clock later, marked by `valid`; `slot_out` and `idx_out` carry the slot
// and the sample index of that output sample. A frame is 64 valid samples. The
// reset is synchronous and active low.
//
// The states PREPARE and ACTIVE, the allow/ready handshake, the byte split into
// two 4-bit symbols and the 32 samples per slot follow the design description.
// Which nibble is s1, the one-cycle output register, the CORE_INIT duration and
// the zero output outside ACTIVE are this design's own choices.
module broadcast_core
  import stbc_pkg::*;
#(
  parameter int unsigned CHANNEL = 1,   // 1 or 2: antenna column of the Alamouti code
  parameter int unsigned DAC_W   = 12   // signed DAC sample width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    allow,    // from BroadcastCONT: start a frame
  input  byte_t                   data,     // byte to send, valid while allow
  output logic                    ready,    // in PREPARE, waiting for allow
  output logic                    active,   // in ACTIVE, sending a frame
  output logic signed [DAC_W-1:0] i_out,    // I sample to the DAC
  output logic signed [DAC_W-1:0] q_out,    // Q sample to the DAC
  output logic                    valid,    // i_out/q_out hold a frame sample
  output slot_e                   slot_out, // slot of the output sample
  output phase_t                  idx_out   // index of the output sample in its slot
);

  core_state_e state;
  sym_t        s1, s2;
  slot_e       slot;
  phase_t      n;
  tx_cmd_t     cmd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= CORE_RESET;
      s1    <= '0;
      s2    <= '0;
      slot  <= SLOT1;
      n     <= '0;
    end else begin
      unique case (state)
        CORE_RESET: state <= CORE_INIT;
        CORE_INIT: begin
          slot  <= SLOT1;
          n     <= '0;
          state <= CORE_PREPARE;
        end
        CORE_PREPARE: begin
          if (allow) begin
            s1    <= data[DATA_W-1 -: SYM_W];
            s2    <= data[SYM_W-1:0];
            slot  <= SLOT1;
            n     <= '0;
            state <= CORE_ACTIVE;
          end
        end
        CORE_ACTIVE: begin
          n <= n + phase_t'(1);
          if (n == phase_t'(SAMPLES_PER_SLOT - 1)) begin
            if (slot == SLOT2) state <= CORE_PREPARE;
            slot <= (slot == SLOT1) ? SLOT2 : SLOT1;
          end
        end
        default: state <= CORE_RESET;
      endcase
    end
  end

  assign ready  = (state == CORE_PREPARE);
  assign active = (state == CORE_ACTIVE);

  alamouti_encoder #(.CHANNEL(CHANNEL)) u_enc (
    .s1   (s1),
    .s2   (s2),
    .slot (slot),
    .cmd  (cmd)
  );

  psk16_wavegen #(.DAC_W(DAC_W)) u_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (active),
    .cmd   (cmd),
    .n     (n),
    .i_out (i_out),
    .q_out (q_out),
    .valid (valid)
  );

  // Slot and index of the sample now on the outputs.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_out <= SLOT1;
      idx_out  <= '0;
    end else begin
      slot_out <= slot;
      idx_out  <= n;
    end
  end

endmodule
