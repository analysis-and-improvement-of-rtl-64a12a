// Multiple-polynomial LFSR pseudorandom number generator for EPC Gen2 tags.
//
// A plain LFSR is linear: 2n consecutive output bits reveal its feedback
// polynomial. Here the polynomial itself changes every LFSR cycle. Three true
// random bits, shifted in from an on-tag TRNG (ports trn_bit/trn_valid),
// choose one of eight primitive degree-16 polynomials; a rotation makes sure
// the same polynomial is never used twice in a row. The eight polynomials
// share x^16, x^15, x^9 and 1 and differ in six terms, so the feedback network
// is three fixed taps plus six AND-gated ones feeding an XOR chain.
//
// Blocks: seed storage -> 16-cell LFSR <- feedback network <- decoding logic
// <- 3-cell trn register <- TRNG (outside); a controller loads the seed
// (init) and runs ROUNDS LFSR cycles per requested number (req).
//
// Interface and timing: init or req are sampled in idle. If req is high in
// cycle 0, the LFSR shifts in cycles 1..ROUNDS and rn16_valid pulses in cycle
// ROUNDS+1 (17 cycles after the request; one number per 18 cycles at most); rn16 = {s16..s1} is then the new number and stays
// until the next run. out_bit is cell s1, the serial output. poly_sel is the
// polynomial used by the LFSR cycle in progress. The LFSR structure, the
// polynomial set and sixteen rotations per number follow the design; the
// handshake, seed default and port list are this design's choices.
module mp_prng
  import mp_prng_pkg::*;
#(
  parameter int unsigned ROUNDS       = 16,
  parameter lfsr_state_t SEED_DEFAULT = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trn_bit,
  input  logic        trn_valid,
  input  logic        seed_wr,
  input  lfsr_state_t seed_in,
  input  logic        init,
  input  logic        req,
  output logic        busy,
  output logic        rn16_valid,
  output lfsr_state_t rn16,
  output logic        out_bit,
  output poly_sel_t   poly_sel
);

  lfsr_state_t seed, state;
  poly_sel_t   t;
  var_taps_t   taps;
  logic        fb, lfsr_load, shift_en;

  mp_seed_store #(.SEED_DEFAULT(SEED_DEFAULT)) u_seed (
    .clk, .rst_n, .wr(seed_wr), .din(seed_in), .seed
  );

  mp_trn_reg u_trn (
    .clk, .rst_n, .trn_bit, .trn_valid, .t
  );

  mp_poly_decoder u_dec (
    .clk, .rst_n, .advance(shift_en), .t, .sel(poly_sel), .rotated(), .taps
  );

  mp_feedback u_fb (
    .state, .taps, .fb
  );

  mp_lfsr16 #(.RESET_VALUE(SEED_DEFAULT)) u_lfsr (
    .clk, .rst_n, .load(lfsr_load), .seed, .shift(shift_en), .fb, .state, .out_bit
  );

  mp_prng_ctrl #(.ROUNDS(ROUNDS)) u_ctrl (
    .clk, .rst_n, .init, .req, .lfsr_load, .shift_en, .busy, .done(rn16_valid)
  );

  assign rn16 = state;

  // The LFSR must never reach the all-zero state, from which it cannot leave.
  assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
