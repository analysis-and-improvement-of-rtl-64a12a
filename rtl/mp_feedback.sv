// Feedback network of the multiple-polynomial LFSR.
//
// Combinational. The new bit for cell s16 is the XOR of the cells tapped by
// the current feedback polynomial. Three taps are present in every one of the
// eight polynomials and are wired straight to the XOR chain: c9 (cell s8),
// c15 (s2) and c16 (s1). The six others, c4 (s13), c6 (s11), c8 (s9),
// c10 (s7), c12 (s5) and c14 (s3), pass through an AND gate whose second input
// is the enable from the decoding logic. That gives six AND gates and a chain
// of eight two-input XORs, as in the published gate budget.
//
// Interface: state (bit i-1 = cell s_i), taps = {c14,c12,c10,c8,c6,c4},
// fb = feedback bit. No timing of its own.
module mp_feedback
  import mp_prng_pkg::*;
(
  input  lfsr_state_t state,
  input  var_taps_t   taps,
  output logic        fb
);

  var_taps_t gated;

  always_comb begin
    gated[0] = taps[0] & state[tap_bit(4)];
    gated[1] = taps[1] & state[tap_bit(6)];
    gated[2] = taps[2] & state[tap_bit(8)];
    gated[3] = taps[3] & state[tap_bit(10)];
    gated[4] = taps[4] & state[tap_bit(12)];
    gated[5] = taps[5] & state[tap_bit(14)];
    fb = (^gated) ^ state[tap_bit(9)] ^ state[tap_bit(15)] ^ state[tap_bit(16)];
  end

endmodule
