// Control of the PRNG: seed loading and one 16-bit number per request.
//
// A three-state machine. In IDLE, init=1 pulses lfsr_load for one cycle so
// that the LFSR takes the stored seed; otherwise req=1 starts a run. In RUN,
// shift_en is high for exactly ROUNDS consecutive cycles (one LFSR cycle, and
// one fresh polynomial selection, per clock). The machine then spends one
// cycle in DONE, where done=1 tells that the LFSR now holds the new number.
// init and req are ignored while busy; init wins over req when both arrive
// in IDLE. Sixteen rotations per 16-bit number follow the design; the
// handshake (level inputs sampled in IDLE, one-cycle done) is this design's
// choice.
//
// Timing: if req is high in cycle 0 (sampled at the edge ending it),
// shift_en is high in cycles 1..ROUNDS and done in cycle ROUNDS+1: the number
// is ready ROUNDS+1 = 17 cycles after the request cycle, well within the
// 220-cycle budget an EPC Gen2 tag allows. A new request is accepted in cycle
// ROUNDS+2, so back-to-back numbers come every ROUNDS+2 = 18 cycles.
module mp_prng_ctrl #(
  parameter int unsigned ROUNDS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic req,
  output logic lfsr_load,
  output logic shift_en,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;

  localparam int unsigned CW = $clog2(ROUNDS + 1);

  state_t         state;
  logic [CW-1:0]  count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      count <= '0;
    end else begin
      unique case (state)
        IDLE: if (!init && req) begin
          state <= RUN;
          count <= '0;
        end
        RUN: begin
          count <= count + 1'b1;
          if (count == CW'(ROUNDS - 1)) state <= DONE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    lfsr_load = (state == IDLE) && init;
    shift_en  = (state == RUN);
    busy      = (state != IDLE);
    done      = (state == DONE);
  end

  // A run always lasts ROUNDS shift cycles and never overlaps a seed load.
  assert property (@(posedge clk) disable iff (!rst_n) !(lfsr_load && shift_en));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == RUN) |-> (count < CW'(ROUNDS)));

endmodule
