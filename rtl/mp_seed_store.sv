// Seed storage: the value the LFSR is initialised from.
//
// A 16-bit register that comes out of reset holding SEED_DEFAULT and can be
// rewritten with wr=1 (for instance by the tag's personalisation logic, so
// that every tag starts from its own seed). The design only names this
// storage; the default, the write port and its timing are this design's
// choices. The seed must not be zero: an all-zero LFSR never leaves zero under
// any of the eight polynomials, and a write of zero is ignored.
//
// Interface: seed is a register output, updated on the edge where wr=1.
module mp_seed_store
  import mp_prng_pkg::*;
#(
  parameter lfsr_state_t SEED_DEFAULT = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  lfsr_state_t din,
  output lfsr_state_t seed
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 seed <= SEED_DEFAULT;
    else if (wr && din != '0)   seed <= din;
  end

endmodule
