// Testbench for mp_lfsr16, the 16-cell shift register.
//
// Checks the reset value, then applies random load/shift/feedback for 3000
// cycles and compares state and out_bit every cycle with a model kept here:
// load copies the seed, shift moves every cell one place toward s1 and puts
// the feedback bit in s16.
module tb_mp_lfsr16;
  import mp_prng_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0, shift = 0, fb = 0;
  lfsr_state_t seed = '0, state, model;
  logic        out_bit;
  int          checks = 0, failures = 0;

  mp_lfsr16 #(.RESET_VALUE(16'h1234)) dut (.clk, .rst_n, .load, .seed, .shift, .fb, .state, .out_bit);

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
    if (state !== 16'h1234) begin failures++; $display("reset value %h", state); end
    rst_n = 1;
    model = 16'h1234;
    for (int i = 0; i < 3000; i++) begin
      load  = ($urandom % 8) == 0;
      shift = ($urandom % 4) != 0;
      fb    = 1'($urandom);
      seed  = lfsr_state_t'($urandom);
      @(posedge clk);
      if (load)       model = seed;
      else if (shift) model = {fb, model[15:1]};
      #1;
      checks++;
      if (state !== model || out_bit !== model[0]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: state %h expected %h", i, state, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
