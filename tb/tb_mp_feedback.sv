// Testbench for mp_feedback, the AND/XOR feedback network.
//
// Part 1 drives random cell values and tap enables and compares fb with a
// parity worked out here from the coefficient numbers (c_k reads cell
// s_(17-k)). Part 2 builds each of the eight feedback polynomials from its
// list of exponents, closes the loop through a shift register kept in the
// testbench, and checks that the sequence has the full period 2^16-1, which
// holds only if every tap lands on the right cell.
module tb_mp_feedback;
  import mp_prng_pkg::*;

  lfsr_state_t state;
  var_taps_t   taps;
  logic        fb;
  int          checks = 0, failures = 0;

  mp_feedback dut (.state, .taps, .fb);

  // Exponents between 1 and 15 of each polynomial (x^16 and 1 are implied).
  int exps [8][6];
  int nexp [8];
  localparam int VAR_DEG [6] = '{4, 6, 8, 10, 12, 14};

  function automatic logic ref_fb(lfsr_state_t s, var_taps_t en);
    logic r;
    r = s[16-16] ^ s[16-15] ^ s[16-9];
    for (int i = 0; i < 6; i++) if (en[i]) r ^= s[16-VAR_DEG[i]];
    return r;
  endfunction

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exps = '{'{15,10,9,8,6,0}, '{15,14,12,10,9,0}, '{15,14,10,9,8,0}, '{15,9,6,0,0,0},
             '{15,9,4,0,0,0},  '{15,12,9,6,4,0},   '{15,14,12,9,8,0}, '{15,14,12,9,4,0}};
    nexp = '{5, 5, 5, 3, 3, 5, 5, 5};

    for (int i = 0; i < 2000; i++) begin
      state = lfsr_state_t'($urandom);
      taps  = var_taps_t'($urandom);
      #1;
      checks++;
      if (fb !== ref_fb(state, taps)) begin
        failures++;
        $display("mismatch state=%h taps=%b fb=%b", state, taps, fb);
      end
    end

    for (int p = 0; p < 8; p++) begin
      int period;
      taps = '0;
      for (int e = 0; e < nexp[p]; e++)
        for (int i = 0; i < 6; i++) if (exps[p][e] == VAR_DEG[i]) taps[i] = 1'b1;
      state  = 16'h0001;
      period = 0;
      do begin
        #1;
        state = {fb, state[15:1]};
        period++;
      end while (state != 16'h0001 && period < 70000);
      checks++;
      if (period != 65535) begin
        failures++;
        $display("polynomial %0d: period %0d, expected 65535", p, period);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
