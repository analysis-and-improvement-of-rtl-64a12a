// End-to-end testbench for mp_prng at its default parameters.
//
// A cycle-accurate reference model of the whole generator is kept here,
// written from the description of the design: trn bits shifting into t0..t2,
// polynomial index t (or t+1 when t repeats the previous LFSR cycle's index),
// feedback from the exponent list of that polynomial, sixteen LFSR cycles per
// request, seed storage that ignores zero. The TRNG is stood in for by
// $urandom. Every cycle the outputs are compared with the model, and the
// request-to-result latency is checked against ROUNDS+1 = 17 cycles.
//
// Each mechanism of the design is counted and must occur at least once:
// seed write, rejected zero seed, seed load, polynomial rotation, each of the
// eight polynomials, a cycle without a fresh trn bit inside a run, a request
// ignored while busy, and a completed number.
module tb_mp_prng;
  import mp_prng_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        trn_bit = 0, trn_valid = 0, seed_wr = 0, init = 0, req = 0;
  lfsr_state_t seed_in = '0;
  logic        busy, rn16_valid, out_bit;
  lfsr_state_t rn16;
  poly_sel_t   poly_sel;

  mp_prng dut (.clk, .rst_n, .trn_bit, .trn_valid, .seed_wr, .seed_in, .init, .req,
               .busy, .rn16_valid, .rn16, .out_bit, .poly_sel);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%t FAIL: %s", $time, what);
    end
  endtask

  // ---- reference model state ----
  int          exps [8][6];
  logic [15:0] m_lfsr, m_seed;
  logic [2:0]  m_t, m_prev;
  int          m_phase;      // 0 idle, 1..16 shifting, 17 done
  time         req_time;
  int          numbers;

  function automatic logic [2:0] m_sel();
    return (m_t == m_prev) ? m_t + 3'd1 : m_t;
  endfunction

  function automatic logic m_fb(logic [2:0] p, logic [15:0] s);
    logic r;
    r = s[0];                                  // x^16 term: cell s1
    foreach (exps[p][e]) if (exps[p][e] != 0) r ^= s[16 - exps[p][e]];
    return r;
  endfunction

  // ---- mechanism counters ----
  int n_seed_wr, n_zero_rej, n_load, n_rot, n_stall, n_ignored;
  int n_poly [8];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exps = '{'{15,10,9,8,6,0}, '{15,14,12,10,9,0}, '{15,14,10,9,8,0}, '{15,9,6,0,0,0},
             '{15,9,4,0,0,0},  '{15,12,9,6,4,0},   '{15,14,12,9,8,0}, '{15,14,12,9,4,0}};
    n_poly = '{default: 0};
    {n_seed_wr, n_zero_rej, n_load, n_rot, n_stall, n_ignored, numbers} = '0;

    repeat (2) @(posedge clk);
    #1;
    check(rn16 == 16'hACE1 && !busy, "reset state");
    rst_n = 1;
    m_lfsr = 16'hACE1; m_seed = 16'hACE1; m_t = '0; m_prev = '0; m_phase = 0;

    for (int cyc = 0; cyc < 60000; cyc++) begin
      @(negedge clk);
      // stimulus: phases of a stuck TRNG, a slow TRNG and a healthy one
      if ((cyc / 2000) % 5 == 1)      begin trn_valid = 1'b0; end
      else if ((cyc / 2000) % 5 == 2) begin trn_valid = ($urandom % 4) == 0; trn_bit = 1'($urandom); end
      else                            begin trn_valid = ($urandom % 8) != 0; trn_bit = 1'($urandom); end
      seed_wr = ($urandom % 50) == 0;
      seed_in = (($urandom % 4) == 0) ? '0 : lfsr_state_t'($urandom);
      init    = ($urandom % 40) == 0;
      req     = ($urandom % 3) != 0;
      #1;
      // compare outputs in this cycle
      check(rn16 == m_lfsr && out_bit == m_lfsr[0], $sformatf("rn16 %h expected %h", rn16, m_lfsr));
      check(busy == (m_phase != 0), "busy");
      check(rn16_valid == (m_phase == 17), "rn16_valid");
      if (m_phase >= 1 && m_phase <= 16)
        check(poly_sel == m_sel(), $sformatf("poly_sel %0d expected %0d", poly_sel, m_sel()));
      if (rn16_valid) begin
        check(($time - req_time) / 10 == 17, $sformatf("latency %0d", ($time - req_time) / 10));
        numbers++;
      end
      // mechanism counts
      if (m_phase >= 1 && m_phase <= 16) begin
        if (m_t == m_prev) n_rot++;
        n_poly[m_sel()]++;
        if (!trn_valid) n_stall++;
      end
      if (m_phase == 0 && !init && req) req_time = $time;
      if (m_phase != 0 && req) n_ignored++;
      if (seed_wr && seed_in == 0) n_zero_rej++;
      else if (seed_wr) n_seed_wr++;
      if (m_phase == 0 && init) n_load++;

      // advance the model over the rising edge
      @(posedge clk);
      begin
        logic [15:0] nl;
        logic [2:0]  np;
        int          nph;
        nl = m_lfsr; np = m_prev; nph = m_phase;
        if (m_phase == 0) begin
          if (init) nl = m_seed;
          else if (req) nph = 1;
        end else if (m_phase <= 16) begin
          nl = {m_fb(m_sel(), m_lfsr), m_lfsr[15:1]};
          np = m_sel();
          nph = m_phase + 1;
        end else nph = 0;
        if (seed_wr && seed_in != 0) m_seed = seed_in;
        if (trn_valid) m_t = {m_t[1:0], trn_bit};
        m_lfsr = nl; m_prev = np; m_phase = nph;
      end
    end

    $display("numbers=%0d seed_writes=%0d zero_rejected=%0d loads=%0d rotations=%0d stalls=%0d ignored_req=%0d",
             numbers, n_seed_wr, n_zero_rej, n_load, n_rot, n_stall, n_ignored);
    check(numbers > 0, "no number generated");
    check(n_seed_wr > 0, "seed write never happened");
    check(n_zero_rej > 0, "zero seed write never happened");
    check(n_load > 0, "seed load never happened");
    check(n_rot > 0, "rotation never happened");
    check(n_stall > 0, "trn stall never happened");
    check(n_ignored > 0, "request while busy never happened");
    for (int p = 0; p < 8; p++) begin
      $display("polynomial %0d used %0d times", p, n_poly[p]);
      check(n_poly[p] > 0, $sformatf("polynomial %0d never used", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
