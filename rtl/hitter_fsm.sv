// hitter_fsm: control of the hitter, four states IDLE, CK_INDEX, HAVE_OVF, CK_OVF.
//
// A lookup starts when start is high in IDLE: the backbone memory reads the
// word (bb_en) and the hit counter and address generator are initialised.
// In CK_INDEX the backbone entry is on bb_douta:
//   -1      the word is not in the query: the lookup ends with no hit;
//   >= 0    it is the single query offset: one hit, the lookup ends;
//   <= -2   its negation is the base of a list in the overflow memory.
// HAVE_OVF issues the first overflow read. In CK_OVF one list entry is checked
// per cycle: a query offset is a hit, -1 ends the lookup. Every hit is issued
// as a write (hit_st) together with its query offset (q_off); a hit is held,
// and the overflow read paused, while mc_stall is high.
//
// Timing without stalls: ended pulses 2 cycles after the start cycle for zero
// or one hit and n + 4 cycles after it for an overflow list of n entries.
// count is final when ended is high.
//
// From the source design: the four states and their transitions, the table
// encoding, the use of the absolute value as overflow base address and one list
// entry per cycle. The source text accepts a backbone value ">= 0" as a single
// hit while its state diagram is labelled "> 0"; offset 0 is a valid query
// position, so ">= 0" is used. The stall handling is this design's own.
module hitter_fsm
  import blast_pkg::*;
#(
  parameter int unsigned OV_AW = 16
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  entry_t           bb_douta,
  input  entry_t           ov_douta,
  input  logic             mc_stall,
  output logic             bb_en,
  output logic             ov_en,
  output logic [OV_AW-1:0] ov_addra,
  output logic             cnt_clr,
  output logic             cnt_inc,
  output logic             hit_st,
  output logic [ENTRY_W-1:0] q_off,
  output logic             ended,
  output hit_state_e       state
);

  hit_state_e       nstate;
  logic [OV_AW-1:0] ov_ptr, ov_ptr_n;
  logic             end_now;

  always_comb begin
    nstate   = state;
    ov_ptr_n = ov_ptr;
    bb_en    = 1'b0;
    ov_en    = 1'b0;
    cnt_clr  = 1'b0;
    hit_st   = 1'b0;
    end_now  = 1'b0;
    q_off    = '0;
    unique case (state)
      H_IDLE: begin
        if (start) begin
          bb_en   = 1'b1;
          cnt_clr = 1'b1;
          nstate  = H_CK_INDEX;
        end
      end
      H_CK_INDEX: begin
        q_off = bb_douta;
        if (bb_douta == ENTRY_NONE) begin
          end_now = 1'b1;
          nstate  = H_IDLE;
        end else if (bb_douta >= 0) begin
          if (!mc_stall) begin
            hit_st  = 1'b1;
            end_now = 1'b1;
            nstate  = H_IDLE;
          end
        end else begin
          ov_ptr_n = OV_AW'(-bb_douta);
          nstate   = H_HAVE_OVF;
        end
      end
      H_HAVE_OVF: begin
        ov_en    = 1'b1;
        ov_ptr_n = ov_ptr + 1'b1;
        nstate   = H_CK_OVF;
      end
      H_CK_OVF: begin
        q_off = ov_douta;
        if (ov_douta == ENTRY_NONE) begin
          end_now = 1'b1;
          nstate  = H_IDLE;
        end else if (!mc_stall) begin
          hit_st   = 1'b1;
          ov_en    = 1'b1;
          ov_ptr_n = ov_ptr + 1'b1;
        end
      end
      default: nstate = H_IDLE;
    endcase
  end

  assign cnt_inc  = hit_st;
  assign ov_addra = ov_ptr;

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= H_IDLE;
      ov_ptr <= '0;
      ended  <= 1'b0;
    end else begin
      state  <= nstate;
      ov_ptr <= ov_ptr_n;
      ended  <= end_now;
    end
  end

  // A write is never issued into a stalled memory path.
  assert property (@(posedge clk) disable iff (reset) hit_st |-> !mc_stall);

endmodule
