// Decoding logic: true random bits -> feedback polynomial.
//
// The three trn bits t = {t2,t1,t0} name one of the eight primitive
// polynomials. So that the same polynomial is never used in two consecutive
// LFSR cycles, the selection is rotated: if t equals the index used in the
// previous LFSR cycle, the next index (t+1 modulo 8) is taken instead. The
// polynomial is then expanded into the six tap enables of the feedback
// network. The rotation rule (compare with the last index, step by one) is
// this design's reading of "a simple rotation"; the polynomial set is the
// design's own.
//
// Interface: sel, rotated and taps are combinational from t and the stored
// previous index; advance=1 marks a cycle in which the LFSR shifts, and the
// edge ending it stores sel as the previous index. Reset clears it to 0.
module mp_poly_decoder
  import mp_prng_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      advance,
  input  poly_sel_t t,
  output poly_sel_t sel,
  output logic      rotated,
  output var_taps_t taps
);

  poly_sel_t prev_sel;

  always_comb begin
    rotated = (t == prev_sel);
    sel     = rotated ? poly_sel_t'(t + 1'b1) : t;
    taps    = poly_taps(sel);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       prev_sel <= '0;
    else if (advance) prev_sel <= sel;
  end

endmodule
