// broadcast_cont -- data provider and channel synchroniser (BroadcastCONT).
//
// The data source is an 8-bit counter generated inside the FPGA; each frame
// carries the next counter value (0, 1, ..., 255, 0, ...).
//
// State machine:
//   WAIT_PREPARE  waits until every channel raises `ready` (it stays here
//                 while any channel is still busy); then goes to WAIT_ACTIVE.
//   WAIT_ACTIVE   drives `allow` to all channels together and holds `data`.
//                 When every channel reports `active`, the frame has started
//                 everywhere: the counter advances and the state returns to
//                 WAIT_PREPARE.
// Because one `allow` reaches all channels on the same clock edge, the
// channels start their time slots together, as the Alamouti code requires.
//
// Interface: NUM_CH ready/active inputs, one allow output shared by all
// channels, the data byte, and a one-cycle `frame_start` pulse when a frame is
// released. Timing: from all channels ready to allow is one clock; allow stays
// high until all channels are active. Synchronous active-low reset; the counter
// restarts at 0.
//
// The two states, their conditions and the 8-bit counter follow the design
// description; the Moore-style allow, the moment the counter advances and the
// NUM_CH parameter are this design's own choices.
module broadcast_cont
  import stbc_pkg::*;
#(
  parameter int unsigned NUM_CH = 2   // channels fed by this controller
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_CH-1:0] ready,       // channel in PREPARE
  input  logic [NUM_CH-1:0] active,      // channel in ACTIVE
  output logic              allow,       // start a frame in all channels
  output byte_t             data,        // byte for the frame
  output logic              frame_start  // pulse: all channels took the byte
);

  cont_state_e state;
  byte_t       count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= WAIT_PREPARE;
      count <= '0;
    end else begin
      unique case (state)
        WAIT_PREPARE: if (&ready) state <= WAIT_ACTIVE;
        WAIT_ACTIVE: begin
          if (&active) begin
            count <= count + byte_t'(1);
            state <= WAIT_PREPARE;
          end
        end
        default: state <= WAIT_PREPARE;
      endcase
    end
  end

  assign allow       = (state == WAIT_ACTIVE);
  assign data        = count;
  assign frame_start = (state == WAIT_ACTIVE) && (&active);

  // Handshake rules: the byte does not change while it is offered, and the
  // offer is withdrawn only once every channel has started.
  a_data_stable: assert property (@(posedge clk) disable iff (!rst_n)
    allow && !(&active) |=> allow && $stable(data));
  a_allow_needs_ready: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(allow) |-> $past(&ready));

endmodule
