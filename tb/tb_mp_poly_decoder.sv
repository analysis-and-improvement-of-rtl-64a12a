// Testbench for mp_poly_decoder, the polynomial selection.
//
// Drives random trn bits and advance strobes. Each cycle the selection must
// be t, or t+1 (mod 8) when t equals the index of the previous LFSR cycle;
// the tap enables must match the polynomial's exponent list written out here;
// and two consecutive LFSR cycles must never use the same polynomial. Runs of
// a constant t exercise the rotation heavily.
module tb_mp_poly_decoder;
  import mp_prng_pkg::*;

  logic      clk = 0, rst_n = 0, advance = 0;
  poly_sel_t t = '0, sel, prev, exp_sel;
  logic      rotated;
  var_taps_t taps, exp_taps;
  int        checks = 0, failures = 0, n_rot = 0;
  int        used [8];
  int        exps [8][6];
  localparam int VAR_DEG [6] = '{4, 6, 8, 10, 12, 14};

  mp_poly_decoder dut (.clk, .rst_n, .advance, .t, .sel, .rotated, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exps = '{'{15,10,9,8,6,0}, '{15,14,12,10,9,0}, '{15,14,10,9,8,0}, '{15,9,6,0,0,0},
             '{15,9,4,0,0,0},  '{15,12,9,6,4,0},   '{15,14,12,9,8,0}, '{15,14,12,9,4,0}};
    used = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 500 < 40) t = 3'd5;             // stuck source: forces rotations
      else if (($urandom % 4) != 0) t = poly_sel_t'($urandom);
      advance = ($urandom % 5) != 0;
      #1;
      exp_sel = (t == prev) ? poly_sel_t'(t + 1) : t;
      exp_taps = '0;
      foreach (exps[exp_sel][e])
        for (int k = 0; k < 6; k++) if (exps[exp_sel][e] == VAR_DEG[k]) exp_taps[k] = 1'b1;
      checks++;
      if (sel !== exp_sel || taps !== exp_taps || rotated !== (t == prev)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: t=%0d prev=%0d sel=%0d taps=%b exp %0d %b",
                                    i, t, prev, sel, taps, exp_sel, exp_taps);
      end
      if (advance) begin
        checks++;
        if (sel == prev) begin failures++; $display("same polynomial twice, cycle %0d", i); end
        if (rotated) n_rot++;
        used[sel]++;
        prev = exp_sel;
      end
    end
    checks++;
    if (n_rot == 0) begin failures++; $display("rotation never happened"); end
    for (int p = 0; p < 8; p++) begin
      checks++;
      if (used[p] == 0) begin failures++; $display("polynomial %0d never selected", p); end
    end
    $display("rotations=%0d", n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
