// Testbench for mp_prng_ctrl, the sequencer.
//
// Issues random init/req pulses and measures every run: exactly 16 shift
// cycles, done one cycle after the last shift (17 cycles after the request
// cycle), busy for the whole run, requests and inits ignored while busy, init
// winning over req, and a one-cycle lfsr_load for an init in idle.
module tb_mp_prng_ctrl;
  logic clk = 0, rst_n = 0, init = 0, req = 0;
  logic lfsr_load, shift_en, busy, done;
  int   checks = 0, failures = 0, runs = 0, loads = 0;

  mp_prng_ctrl dut (.clk, .rst_n, .init, .req, .lfsr_load, .shift_en, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: an expected busy-cycle counter started by the request edge.
  int exp_phase;   // 0 idle, 1..16 shifting, 17 done
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_phase = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      init = ($urandom % 9) == 0;
      req  = ($urandom % 3) == 0;
      #1;
      checks++;
      if (lfsr_load !== (exp_phase == 0 && init) ||
          shift_en  !== (exp_phase >= 1 && exp_phase <= 16) ||
          done      !== (exp_phase == 17) ||
          busy      !== (exp_phase != 0)) begin
        failures++;
        if (failures < 10) $display("cycle %0d phase %0d: load=%b shift=%b done=%b busy=%b",
                                    i, exp_phase, lfsr_load, shift_en, done, busy);
      end
      if (lfsr_load) loads++;
      if (done) runs++;
      @(posedge clk);
      if (exp_phase == 0) exp_phase = (!init && req) ? 1 : 0;
      else if (exp_phase == 17) exp_phase = 0;
      else exp_phase++;
    end
    checks++;
    if (runs < 10 || loads < 10) begin failures++; $display("too few runs/loads"); end
    $display("runs=%0d loads=%0d", runs, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
