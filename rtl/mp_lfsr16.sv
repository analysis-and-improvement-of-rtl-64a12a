// 16-cell shift register of the PRNG (cells s16..s1).
//
// On a clock edge with shift=1 every cell takes the value of its left
// neighbour (s_i <= s_(i+1)), s16 takes the feedback bit fb, and the bit that
// was in s1 leaves as output. load=1 copies the seed into the cells instead
// and has priority over shift. The register is reset to RESET_VALUE; the
// reset value and the load port are this design's choices for the seed
// initialisation the design calls for.
//
// Interface: state (bit i-1 = cell s_i) and out_bit (= s1) are register
// outputs, valid the cycle after the edge that changed them.
module mp_lfsr16
  import mp_prng_pkg::*;
#(
  parameter lfsr_state_t RESET_VALUE = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  lfsr_state_t seed,
  input  logic        shift,
  input  logic        fb,
  output lfsr_state_t state,
  output logic        out_bit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= RESET_VALUE;
    else if (load)  state <= seed;
    else if (shift) state <= {fb, state[LFSR_LEN-1:1]};
  end

  assign out_bit = state[0];

endmodule
