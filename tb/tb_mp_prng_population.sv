// Population workload for mp_prng (default parameters): EPC Gen2 PRNG
// property 2, no two tags of a 10,000-tag population producing the same
// sequence.
//
// One generator instance stands in for every tag in turn: it is reset (a tag
// being energised), then produces FIRST_N 16-bit numbers, while $urandom
// plays the part of that tag's true random source. The first FIRST_N numbers
// of each tag form its sequence. Two populations are run:
//  * 10,000 tags that all hold the same factory seed, so that only the true
//    random bits can tell them apart (the hardest case);
//  * 10,000 tags whose seed storage was written with a random non-zero seed.
// In each population all sequences must differ.
module tb_mp_prng_population;
  import mp_prng_pkg::*;

  localparam int TAGS    = 10_000;
  localparam int FIRST_N = 4;

  logic        clk = 0, rst_n = 0;
  logic        trn_bit = 0, trn_valid = 0, req = 0, init = 0, seed_wr = 0;
  lfsr_state_t seed_in = '0;
  logic        busy, rn16_valid, out_bit;
  lfsr_state_t rn16;
  poly_sel_t   poly_sel;

  mp_prng dut (.clk, .rst_n, .trn_bit, .trn_valid, .seed_wr, .seed_in, .init,
               .req, .busy, .rn16_valid, .rn16, .out_bit, .poly_sel);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    trn_bit   <= 1'($urandom);
    trn_valid <= 1'b1;
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (2 * TAGS * (FIRST_N * 20 + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_population(input bit random_seed, output int dups);
    bit seen [logic [16*FIRST_N-1:0]];
    dups = 0;
    for (int tag = 0; tag < TAGS; tag++) begin
      logic [16*FIRST_N-1:0] key;
      @(negedge clk);
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      if (random_seed) begin
        seed_in = lfsr_state_t'($urandom_range(1, 65535));
        seed_wr = 1;
        @(negedge clk);
        seed_wr = 0;
        init    = 1;
        @(negedge clk);
        init    = 0;
      end
      for (int k = 0; k < FIRST_N; k++) begin
        req = 1;
        @(negedge clk);
        req = 0;
        while (!rn16_valid) @(negedge clk);
        key[16*k +: 16] = rn16;
        @(negedge clk);                      // back in idle
      end
      if (seen.exists(key)) dups++;
      seen[key] = 1'b1;
    end
  endtask

  initial begin
    int dups;
    run_population(1'b0, dups);
    $display("same seed: %0d repeated sequences among %0d tags", dups, TAGS);
    checks++;
    if (dups != 0) failures++;
    run_population(1'b1, dups);
    $display("random seeds: %0d repeated sequences among %0d tags", dups, TAGS);
    checks++;
    if (dups != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
