// Self-test sequencer of the low power BIST datapath.
// A start pulse in IDLE moves to CLEAR, one cycle that clears the pattern
// generator and the accumulator. RUN then advances the pattern generator one
// slice load per clock and accumulates the product of the operands loaded on
// the previous edge. When the generator flags its final load (tpg_last) the
// sequencer enters DRAIN for one cycle, in which the accumulator takes the
// product of that final vector, and then returns to IDLE with a one-cycle
// done pulse. busy is high from CLEAR to DRAIN and selects test mode in the
// datapath. With NE slice loads per code and 2^CW codes, a test takes
// 2^CW * NE + 2 cycles from start to done. The test length is the document's
// (every code loaded into every slice); the states and the start/done
// handshake are this design's choices.
module bist_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic tpg_last,
  output logic clr,
  output logic tpg_run,
  output logic acc_en,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {IDLE, CLEAR, RUN, DRAIN} state_e;

  state_e state, state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      IDLE:    if (start) state_d = CLEAR;
      CLEAR:   state_d = RUN;
      RUN:     if (tpg_last) state_d = DRAIN;
      DRAIN:   state_d = IDLE;
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_d;
  end

  assign clr     = (state == CLEAR);
  assign tpg_run = (state == RUN);
  assign acc_en  = (state == RUN) || (state == DRAIN);
  assign busy    = (state != IDLE);
  assign done    = (state == DRAIN);

  // The generator only reports its final load while it is running.
  a_last_in_run: assert property (@(posedge clk) disable iff (!rst_n)
                                  tpg_last |-> state == RUN);

endmodule
