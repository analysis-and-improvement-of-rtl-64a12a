// Testbench for mp_trn_reg, the three-cell register for true random bits.
//
// Random bits with a random valid strobe; the register must hold the last
// three accepted bits, newest in t0, and keep them while valid is low.
module tb_mp_trn_reg;
  import mp_prng_pkg::*;

  logic      clk = 0, rst_n = 0, trn_bit = 0, trn_valid = 0;
  poly_sel_t t;
  logic [2:0] hist;
  int        checks = 0, failures = 0;

  mp_trn_reg dut (.clk, .rst_n, .trn_bit, .trn_valid, .t);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (t !== 3'b000) begin failures++; $display("reset value %b", t); end
    rst_n = 1;
    hist = '0;
    for (int i = 0; i < 3000; i++) begin
      trn_bit   = 1'($urandom);
      trn_valid = ($urandom % 3) != 0;
      @(posedge clk);
      if (trn_valid) hist = {hist[1], hist[0], trn_bit};
      #1;
      checks++;
      if (t !== hist) begin
        failures++;
        if (failures < 10) $display("cycle %0d: t=%b expected %b", i, t, hist);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
