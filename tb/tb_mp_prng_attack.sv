// Attack workload for mp_prng (default parameters): the linear-algebra attack
// that breaks LFSR generators with output-side randomness, run against this
// generator.
//
// The attack takes a window of 2n = 32 consecutive output bits, solves the
// 16x16 linear system over GF(2) that a fixed-polynomial LFSR would satisfy
// (each bit is the XOR of the 16 before it selected by the coefficients),
// and counts how many consecutive windows give the same solution; n = 16
// identical solutions in a row is taken as proof of the polynomial. Here, in
// addition, every solution is used to predict the 16 bits that follow the
// window.
//
//  * Control: the attack is first run on a stream from a plain 16-bit LFSR
//    with one fixed polynomial, computed in this testbench. It must find the
//    polynomial and predict every 16-bit continuation.
//  * Attack on the generator: STREAM_BITS serial output bits of mp_prng
//    (the concatenated rn16 values, bit 0 first, are exactly the bits shifted
//    out). No window may give a solution that predicts the next 16 bits more
//    often than 0.025 % of the time (the Gen2 prediction bound), and the
//    self-verified attack (16 identical solutions and a correct prediction)
//    must never succeed.
module tb_mp_prng_attack;
  import mp_prng_pkg::*;

  localparam int STREAM_BITS = 400_000;
  localparam int N = 16;

  logic        clk = 0, rst_n = 0;
  logic        trn_bit = 0, trn_valid = 0, req = 0;
  logic        busy, rn16_valid, out_bit;
  lfsr_state_t rn16;
  poly_sel_t   poly_sel;

  mp_prng dut (.clk, .rst_n, .trn_bit, .trn_valid, .seed_wr(1'b0), .seed_in('0), .init(1'b0),
               .req, .busy, .rn16_valid, .rn16, .out_bit, .poly_sel);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    trn_bit   <= 1'($urandom);
    trn_valid <= 1'b1;
  end

  int checks = 0, failures = 0;
  bit stream [STREAM_BITS];
  int nbits = 0;

  initial begin
    repeat (STREAM_BITS / 16 * 18 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && rn16_valid && nbits < STREAM_BITS) begin
      for (int b = 0; b < 16; b++) stream[nbits + b] <= rn16[b];
      nbits <= nbits + 16;
    end

  // Solve for c_1..c_N in  s[i+N] = XOR_j c_j s[i+N-j],  i = 0..N-1,
  // with s = the window starting at 'start'. Returns 0 if singular.
  function automatic bit solve_window(input int start, output logic [N-1:0] c);
    logic [N:0] rows [N];
    int piv;
    for (int i = 0; i < N; i++) begin
      rows[i] = '0;
      for (int j = 1; j <= N; j++) rows[i][j-1] = stream[start + i + N - j];
      rows[i][N] = stream[start + i + N];
    end
    piv = 0;
    for (int col = 0; col < N; col++) begin
      int p = -1;
      for (int r = piv; r < N; r++) if (p < 0 && rows[r][col]) p = r;
      if (p < 0) return 1'b0;
      begin logic [N:0] tmp = rows[piv]; rows[piv] = rows[p]; rows[p] = tmp; end
      for (int r = 0; r < N; r++) if (r != piv && rows[r][col]) rows[r] ^= rows[piv];
      piv++;
    end
    for (int i = 0; i < N; i++) c[i] = rows[i][N];
    return 1'b1;
  endfunction

  // Does polynomial c, run on the window's last N bits, reproduce the N bits
  // that follow the window?
  function automatic bit predicts(input int start, input logic [N-1:0] c);
    bit w [3*N];
    for (int k = 0; k < 2*N; k++) w[k] = stream[start + k];
    for (int k = 2*N; k < 3*N; k++) begin
      bit nb = 0;
      for (int j = 1; j <= N; j++) nb ^= c[j-1] & w[k-j];
      w[k] = nb;
      if (nb != stream[start + k]) return 1'b0;
    end
    return 1'b1;
  endfunction

  // Runs the attack over the first 'len' bits of 'stream'.
  task automatic attack(input int len, output int windows, output int solved,
                        output int predicted, output int longest, output int verified,
                        output logic [N-1:0] last_c);
    logic [N-1:0] c, prev_c;
    bit have_prev = 0;
    int run = 0;
    {windows, solved, predicted, longest, verified} = '0;
    last_c = '0;
    for (int i = 0; i + 3*N <= len; i++) begin
      windows++;
      if (solve_window(i, c)) begin
        bit ok;
        solved++;
        ok = predicts(i, c);
        if (ok) predicted++;
        if (have_prev && c == prev_c) run++;
        else run = 0;
        if (run > longest) longest = run;
        if (run >= N && ok) verified++;
        prev_c    = c;
        have_prev = 1;
        last_c    = c;
      end else begin
        run = 0;
        have_prev = 0;
      end
    end
  endtask

  initial begin
    int windows, solved, predicted, longest, verified;
    logic [N-1:0] c;
    logic [15:0] s;
    real rate;

    // Control: plain LFSR, polynomial x16+x15+x10+x9+x8+x6+1.
    s = 16'hACE1;
    for (int k = 0; k < 2000; k++) begin
      stream[k] = s[0];
      s = {s[0] ^ s[1] ^ s[6] ^ s[7] ^ s[8] ^ s[10], s[15:1]};
    end
    attack(2000, windows, solved, predicted, longest, verified, c);
    $display("plain LFSR: %0d windows, %0d predicted, longest run %0d, recovered c=%b",
             windows, predicted, longest, c);
    checks++;
    if (predicted != windows || verified == 0) begin failures++; $display("attack failed on a plain LFSR"); end
    checks++;
    if (c != 16'b1100_0011_1010_0000) begin failures++; $display("wrong polynomial recovered"); end

    // The generator.
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req = 1;
    wait (nbits >= STREAM_BITS);
    @(negedge clk);
    req = 0;
    attack(STREAM_BITS, windows, solved, predicted, longest, verified, c);
    rate = real'(predicted) / real'(windows);
    $display("generator: %0d windows, %0d solvable, %0d predicted the next 16 bits (%f %%), longest run of identical solutions %0d, self-verified successes %0d",
             windows, solved, predicted, 100.0 * rate, longest, verified);
    checks++;
    if (rate > 0.00025) begin failures++; $display("prediction rate above 0.025 %%"); end
    checks++;
    if (verified != 0) begin failures++; $display("self-verified attack succeeded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
