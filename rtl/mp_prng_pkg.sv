// Shared constants and types of the multiple-polynomial LFSR PRNG.
//
// The generator is a 16-cell LFSR (cells s16..s1, s1 is the output) whose
// feedback polynomial is one of eight primitive degree-16 polynomials. All
// eight contain x^16, x^15, x^9 and 1; they differ only in x^4, x^6, x^8,
// x^10, x^12 and x^14, so a polynomial is fully described by six tap enables.
// A coefficient c_k of C(x) = 1 + c_1 x + ... + c_16 x^16 taps cell s_(17-k).
//
// Encoding of var_taps_t (this design's choice): bit 0 = c4, bit 1 = c6,
// bit 2 = c8, bit 3 = c10, bit 4 = c12, bit 5 = c14. The row order of the
// table below (selector value 0..7) follows the order in which the eight
// polynomials are listed for the design; which selector value maps to which
// polynomial is otherwise not fixed by it.
package mp_prng_pkg;

  localparam int unsigned LFSR_LEN     = 16;  // cells in the LFSR
  localparam int unsigned SEL_BITS     = 3;   // true random bits per selection
  localparam int unsigned NUM_VAR_TAPS = 6;   // AND-gated taps

  typedef logic [LFSR_LEN-1:0]     lfsr_state_t;  // bit i-1 holds cell s_i
  typedef logic [SEL_BITS-1:0]     poly_sel_t;
  typedef logic [NUM_VAR_TAPS-1:0] var_taps_t;    // {c14,c12,c10,c8,c6,c4}

  // Cell (as bit index of lfsr_state_t) read by coefficient c_k: s_(17-k).
  function automatic int unsigned tap_bit(input int unsigned k);
    return LFSR_LEN - k;
  endfunction

  // Switchable taps of each polynomial.
  //   0: x16+x15+x10+x9+x8+x6+1       4: x16+x15+x9+x4+1
  //   1: x16+x15+x14+x12+x10+x9+1     5: x16+x15+x12+x9+x6+x4+1
  //   2: x16+x15+x14+x10+x9+x8+1      6: x16+x15+x14+x12+x9+x8+1
  //   3: x16+x15+x9+x6+1              7: x16+x15+x14+x12+x9+x4+1
  function automatic var_taps_t poly_taps(input poly_sel_t sel);
    unique case (sel)
      3'd0:    return 6'b001110;
      3'd1:    return 6'b111000;
      3'd2:    return 6'b101100;
      3'd3:    return 6'b000010;
      3'd4:    return 6'b000001;
      3'd5:    return 6'b010011;
      3'd6:    return 6'b110100;
      default: return 6'b110001;
    endcase
  endfunction

endpackage
