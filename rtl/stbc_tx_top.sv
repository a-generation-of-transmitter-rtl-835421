// stbc_tx_top -- two-antenna 16-PSK Alamouti transmitter baseband.
//
// One BroadcastCONT feeds two BroadcastCOREs. The controller's 8-bit counter
// is the data; each byte becomes two 16-PSK symbols s1 (high nibble) and s2
// (low nibble), sent over two time slots of 32 samples:
//
//                 slot 1 (32 clocks)   slot 2 (32 clocks)
//   channel 1          s1                   -s2*
//   channel 2          s2                    s1*
//
// Both channels share the clock, the reset and the controller's allow, so
// their slots are aligned sample for sample. The I/Q samples of each channel
// go out on ports meant for the DAC of its RF module.
//
// Timing: a frame is 64 valid samples per channel; between frames the
// handshake takes 2 clocks in which `valid` is low and the samples are 0, so
// one byte is sent every 66 clocks. Synchronous active-low reset.
//
// The partition into BroadcastCONT and two BroadcastCOREs follows the design
// description; DAC_W and the status outputs are this design's own.
module stbc_tx_top
  import stbc_pkg::*;
#(
  parameter int unsigned DAC_W = 12   // signed DAC sample width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // channel 1 DAC port
  output logic signed [DAC_W-1:0] ch1_i,
  output logic signed [DAC_W-1:0] ch1_q,
  output logic                    ch1_valid,
  // channel 2 DAC port
  output logic signed [DAC_W-1:0] ch2_i,
  output logic signed [DAC_W-1:0] ch2_q,
  output logic                    ch2_valid,
  // status
  output byte_t                   tx_data,      // byte now offered by the controller
  output logic                    frame_start,  // pulse: a byte was taken by both channels
  output slot_e                   tx_slot,      // slot of the current output samples
  output phase_t                  tx_idx        // index of the current output samples
);

  logic [1:0] ready, active;
  logic       allow;
  slot_e      slot2_unused;
  phase_t     idx2_unused;

  broadcast_cont #(.NUM_CH(2)) u_cont (
    .clk         (clk),
    .rst_n       (rst_n),
    .ready       (ready),
    .active      (active),
    .allow       (allow),
    .data        (tx_data),
    .frame_start (frame_start)
  );

  broadcast_core #(.CHANNEL(1), .DAC_W(DAC_W)) u_core_ch1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .allow    (allow),
    .data     (tx_data),
    .ready    (ready[0]),
    .active   (active[0]),
    .i_out    (ch1_i),
    .q_out    (ch1_q),
    .valid    (ch1_valid),
    .slot_out (tx_slot),
    .idx_out  (tx_idx)
  );

  broadcast_core #(.CHANNEL(2), .DAC_W(DAC_W)) u_core_ch2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .allow    (allow),
    .data     (tx_data),
    .ready    (ready[1]),
    .active   (active[1]),
    .i_out    (ch2_i),
    .q_out    (ch2_q),
    .valid    (ch2_valid),
    .slot_out (slot2_unused),
    .idx_out  (idx2_unused)
  );

  // The Alamouti code needs both antennas in the same slot and sample.
  a_channels_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (ready[0] == ready[1]) && (active[0] == active[1]) && (ch1_valid == ch2_valid));

endmodule
