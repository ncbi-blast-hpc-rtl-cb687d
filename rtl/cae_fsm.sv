// cae_fsm: control FSM of the custom application engine (IDLE, COUNT, AEG_STORE).
//
// caep00 in IDLE starts the hitter (start pulse) and moves to COUNT, where the
// FSM waits for the hitter's ended pulse. AEG_STORE then writes the hitter's
// count into the Hits_num AEG register (hits_we) and returns to IDLE. While not
// in IDLE the engine reports itself busy: cae_stall is high, so the dispatch
// interface holds back further instructions, and cae_idle is low.
//
// Timing: stall rises the cycle after caep00 and falls the cycle after
// AEG_STORE, so an AEG read dispatched after stall falls sees the new count.
// A call with a hitter latency of L cycles keeps stall high for L + 1 cycles.
//
// From the source design: the three states, the transitions on caep00 and on
// the hitter's ended signal, storing the result in the AEG register, and that
// this FSM drives stall and idle. The exact stall and idle equations are this
// design's own.
module cae_fsm
  import blast_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       caep00,
  input  logic       hitter_ended,
  output logic       hitter_start,
  output logic       hits_we,
  output logic       cae_stall,
  output logic       cae_idle,
  output cae_state_e state
);

  always_ff @(posedge clk) begin
    if (reset) state <= C_IDLE;
    else begin
      unique case (state)
        C_IDLE:      if (caep00) state <= C_COUNT;
        C_COUNT:     if (hitter_ended) state <= C_AEG_STORE;
        C_AEG_STORE: state <= C_IDLE;
        default:     state <= C_IDLE;
      endcase
    end
  end

  assign hitter_start = (state == C_IDLE) && caep00;
  assign hits_we      = (state == C_AEG_STORE);
  assign cae_stall    = (state != C_IDLE);
  assign cae_idle     = (state == C_IDLE);

endmodule
