// stbc_pkg -- constants and types shared by the 16-PSK Alamouti transmitter.
//
// The transmitter takes one byte at a time, splits it into two 4-bit 16-PSK
// symbols (s1 = high nibble, s2 = low nibble) and sends them from two antennas
// over two time slots with the Alamouti code. Each time slot is 32 clock
// cycles, one I/Q sample per cycle, so one carrier period spans a slot and the
// sample phase advances by 360/32 = 11.25 degrees per cycle. A 16-PSK symbol k
// starts the carrier at k x 22.5 degrees, which is two steps of that grid.
//
// The byte width, the 4-bit symbol, the 32 samples per slot and the two slots
// follow the design description. The state encodings are this design's own.
package stbc_pkg;

  localparam int unsigned DATA_W           = 8;   // byte from the data provider
  localparam int unsigned SYM_W            = 4;   // 16-PSK symbol
  localparam int unsigned SAMPLES_PER_SLOT = 32;  // samples (= clocks) per time slot
  localparam int unsigned PHASE_W          = 5;   // log2(SAMPLES_PER_SLOT)

  typedef logic [DATA_W-1:0]  byte_t;
  typedef logic [SYM_W-1:0]   sym_t;
  typedef logic [PHASE_W-1:0] phase_t;

  // Time slot of the Alamouti code.
  typedef enum logic {SLOT1 = 1'b0, SLOT2 = 1'b1} slot_e;

  // What one channel sends in one time slot: a symbol, possibly conjugated
  // and/or negated (Alamouti column entries s, -s*, s*).
  typedef struct packed {
    sym_t sym;
    logic conj;
    logic neg;
  } tx_cmd_t;

  // BroadcastCONT states.
  typedef enum logic {WAIT_PREPARE = 1'b0, WAIT_ACTIVE = 1'b1} cont_state_e;

  // BroadcastCORE states.
  typedef enum logic [1:0] {
    CORE_RESET   = 2'd0,
    CORE_INIT    = 2'd1,
    CORE_PREPARE = 2'd2,
    CORE_ACTIVE  = 2'd3
  } core_state_e;

endpackage
