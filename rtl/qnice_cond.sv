// qnice_cond -- branch condition evaluation.
//
// A jump or call is taken when the status bit R14[cond] (cond = 0..7 selects
// 1, X, C, Z, N, V, I, M) is set, or, with the negate bit, when it is clear.
// Bit 0 of R14 is always 1, so cond = 0 without negation is "always".
// Purely combinational; selection and negation follow the architecture.
module qnice_cond
  import qnice_pkg::*;
(
  input  flags_t     flags,   // R14[7:0]
  input  logic       negate,  // instruction bit 3
  input  logic [2:0] cond,    // instruction bits 2:0
  output logic       take
);

  logic [7:0] bits;

  always_comb begin
    bits = flags;
    take = bits[cond] ^ negate;
  end

endmodule
