// Testbench for mp_seed_store.
//
// Checks the value after reset, random writes (with write enable toggling),
// and that a write of zero leaves the stored seed unchanged.
module tb_mp_seed_store;
  import mp_prng_pkg::*;

  logic        clk = 0, rst_n = 0, wr = 0;
  lfsr_state_t din = '0, seed, model;
  int          checks = 0, failures = 0;

  mp_seed_store #(.SEED_DEFAULT(16'hBEEF)) dut (.clk, .rst_n, .wr, .din, .seed);

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
    if (seed !== 16'hBEEF) begin failures++; $display("reset value %h", seed); end
    rst_n = 1;
    model = 16'hBEEF;
    for (int i = 0; i < 2000; i++) begin
      wr  = ($urandom % 3) == 0;
      din = (($urandom % 8) == 0) ? '0 : lfsr_state_t'($urandom);
      @(posedge clk);
      if (wr && din != 0) model = din;
      #1;
      checks++;
      if (seed !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: seed %h expected %h", i, seed, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
