// Three-cell register (t0, t1, t2) for true random bits.
//
// The TRNG delivers single bits. Each cycle with trn_valid=1 the register
// shifts: t0 takes trn_bit, t1 takes t0, t2 takes t1. The three cells
// together select the feedback polynomial. A cycle without a fresh bit leaves
// the register unchanged. Serial fill from t0 follows the drawing of the
// design; the valid strobe and the reset to zero are this design's choices.
//
// Interface: t = {t2, t1, t0}, a register output.
module mp_trn_reg
  import mp_prng_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      trn_bit,
  input  logic      trn_valid,
  output poly_sel_t t
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         t <= '0;
    else if (trn_valid) t <= {t[SEL_BITS-2:0], trn_bit};
  end

endmodule
