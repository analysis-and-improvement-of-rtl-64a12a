// Statistical workload for mp_prng (default parameters): EPC Gen2 PRNG
// properties 1 and 3, at a sample size a simulator can afford.
//
// Requests are kept high, so the generator delivers one 16-bit number every
// ROUNDS+2 = 18 cycles; a fresh true random bit ($urandom) arrives every
// cycle. NUMBERS values are collected and checked for:
//  * throughput: exactly 18 cycles between consecutive results;
//  * property 1 (probability of a single value between 0.8 and 1.25 times
//    uniform): the full 65536-bin test needs hundreds of millions of values,
//    so it is applied to the 1024 bins of the upper ten bits and to the 1024
//    bins of the lower ten bits (about 1950 values per bin, where the 0.8/1.25
//    band is about nine standard deviations wide);
//  * property 3 (serial correlation): the correlation coefficient of each
//    value with the next must be below 0.005 in magnitude (its standard
//    deviation at this size is about 0.0007);
//  * each of the sixteen bit positions is 1 in 49..51 % of the values.
module tb_mp_prng_stats;
  import mp_prng_pkg::*;

  localparam int NUMBERS = 2_000_000;
  localparam int BINS    = 1024;

  logic        clk = 0, rst_n = 0;
  logic        trn_bit = 0, trn_valid = 0, req = 0;
  logic        busy, rn16_valid, out_bit;
  lfsr_state_t rn16;
  poly_sel_t   poly_sel;

  mp_prng dut (.clk, .rst_n, .trn_bit, .trn_valid, .seed_wr(1'b0), .seed_in('0), .init(1'b0),
               .req, .busy, .rn16_valid, .rn16, .out_bit, .poly_sel);

  always #5 clk = ~clk;

  int    checks = 0, failures = 0;
  int    hist_hi [BINS], hist_lo [BINS];
  int    ones [16];
  int    count = 0, last_cycle = -1, cycle = 0, bad_gap = 0;
  real   sx = 0, sy = 0, sxx = 0, syy = 0, sxy = 0;
  real   prev_v = 0;

  initial begin
    repeat (NUMBERS * 18 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    trn_bit   <= 1'($urandom);
    trn_valid <= 1'b1;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && rn16_valid) begin
      real v;
      v = real'(rn16);
      hist_hi[rn16[15:6]]++;
      hist_lo[rn16[9:0]]++;
      for (int b = 0; b < 16; b++) ones[b] += rn16[b];
      if (count > 0) begin
        sx += prev_v; sy += v; sxx += prev_v * prev_v; syy += v * v; sxy += prev_v * v;
        if (cycle - last_cycle != 18) bad_gap++;
      end
      prev_v     = v;
      last_cycle <= cycle;
      count++;
    end
  end

  initial begin
    real mean, lo_hi, hi_hi, lo_lo, hi_lo, np, r;
    hist_hi = '{default: 0};
    hist_lo = '{default: 0};
    ones    = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req = 1;
    wait (count == NUMBERS);
    @(negedge clk);
    req = 0;

    checks++;
    if (bad_gap != 0) begin failures++; $display("%0d results not 18 cycles apart", bad_gap); end

    mean  = real'(NUMBERS) / BINS;
    lo_hi = 1e9; hi_hi = 0; lo_lo = 1e9; hi_lo = 0;
    for (int i = 0; i < BINS; i++) begin
      if (hist_hi[i] / mean < lo_hi) lo_hi = hist_hi[i] / mean;
      if (hist_hi[i] / mean > hi_hi) hi_hi = hist_hi[i] / mean;
      if (hist_lo[i] / mean < lo_lo) lo_lo = hist_lo[i] / mean;
      if (hist_lo[i] / mean > hi_lo) hi_lo = hist_lo[i] / mean;
    end
    $display("upper 10 bits: occurrence between %f and %f of uniform", lo_hi, hi_hi);
    $display("lower 10 bits: occurrence between %f and %f of uniform", lo_lo, hi_lo);
    checks++;
    if (!(lo_hi > 0.8 && hi_hi < 1.25)) begin failures++; $display("upper bins outside 0.8..1.25"); end
    checks++;
    if (!(lo_lo > 0.8 && hi_lo < 1.25)) begin failures++; $display("lower bins outside 0.8..1.25"); end

    np = real'(NUMBERS - 1);
    r  = (np * sxy - sx * sy) / ($sqrt(np * sxx - sx * sx) * $sqrt(np * syy - sy * sy));
    $display("serial correlation %f", r);
    checks++;
    if (r > 0.005 || r < -0.005) begin failures++; $display("serial correlation too high"); end

    for (int b = 0; b < 16; b++) begin
      real f;
      f = real'(ones[b]) / NUMBERS;
      checks++;
      if (f < 0.49 || f > 0.51) begin failures++; $display("bit %0d is one in %f of values", b, f); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
