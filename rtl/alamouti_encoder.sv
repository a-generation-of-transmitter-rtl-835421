// alamouti_encoder -- picks what one antenna sends in one Alamouti time slot.
//
// The Alamouti code for two antennas and symbols s1, s2 is
//
//              slot 1   slot 2
//   antenna 1    s1      -s2*
//   antenna 2    s2       s1*
//
// For the channel given by CHANNEL (1 or 2) and the current slot, this block
// returns the symbol to send and two flags, conj (send the complex conjugate)
// and neg (send the negative). The sample generator applies the flags to the
// I/Q samples. Purely combinational.
//
// The code matrix follows the design description; representing each entry as
// symbol + conj + neg flags is this design's choice.
module alamouti_encoder
  import stbc_pkg::*;
#(
  parameter int unsigned CHANNEL = 1   // 1 = antenna 1, 2 = antenna 2
) (
  input  sym_t    s1,
  input  sym_t    s2,
  input  slot_e   slot,
  output tx_cmd_t cmd
);

  initial begin
    assert (CHANNEL == 1 || CHANNEL == 2)
      else $error("alamouti_encoder: CHANNEL must be 1 or 2");
  end

  always_comb begin
    if (CHANNEL == 1) begin
      if (slot == SLOT1) cmd = '{sym: s1, conj: 1'b0, neg: 1'b0};   //  s1
      else               cmd = '{sym: s2, conj: 1'b1, neg: 1'b1};   // -s2*
    end else begin
      if (slot == SLOT1) cmd = '{sym: s2, conj: 1'b0, neg: 1'b0};   //  s2
      else               cmd = '{sym: s1, conj: 1'b1, neg: 1'b0};   //  s1*
    end
  end

endmodule
