// hitter: the hitter processing element of the BLASTn seeding personality.
//
// For one 16-bit subject word (init_index, eight nucleotides) it finds every
// position of that word in the query and, for each one, writes the 64-bit
// offset pair {s_off, 16'b0, query offset} to memory, at consecutive quad-word
// addresses from mem_base. When it is done, ended pulses for one cycle and
// num_of_hits holds the number of positions found.
//
// Inside: the backbone memory (indexed by the word), the overflow memory
// (lists of query offsets ended by -1), the hitter FSM, the hits counter and
// the write address generator. The query offset in a pair comes from the
// backbone entry for a single hit and from the overflow entry otherwise.
//
// Interface: start is sampled in idle together with init_index, s_off and
// mem_base, which must stay stable until ended. mc_req.st is one accepted
// write; it is only raised while mc_stall is low. tbl_* loads the tables
// (tbl_sel 0 = backbone, 1 = overflow), one entry per cycle, while idle.
// Timing: see hitter_fsm (2 cycles for zero or one hit, n + 4 cycles for an
// overflow list of n entries, plus the cycles mc_stall is high).
//
// From the source design: the block structure, both table sizes, the pair
// format and the 32-bit subject offset. The load port and the stall input are
// this design's own.
module hitter
  import blast_pkg::*;
#(
  parameter int unsigned BB_DEPTH = 65536,
  parameter int unsigned OV_DEPTH = 65536,
  parameter int unsigned CNT_W    = 16,
  localparam int unsigned BB_AW   = $clog2(BB_DEPTH),
  localparam int unsigned OV_AW   = $clog2(OV_DEPTH),
  localparam int unsigned TBL_AW  = (BB_AW > OV_AW) ? BB_AW : OV_AW
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               start,
  input  logic [WORD_W-1:0]  init_index,
  input  logic [SOFF_W-1:0]  s_off,
  input  logic [VADR_W-1:0]  mem_base,
  output logic               ended,
  output logic [CNT_W-1:0]   num_of_hits,
  output hit_state_e         state,
  // write requests towards the memory crossbar
  output mc_req_t            mc_req,
  input  logic               mc_stall,
  // table load port
  input  logic               tbl_we,
  input  logic               tbl_sel,
  input  logic [TBL_AW-1:0]  tbl_addr,
  input  logic [ENTRY_W-1:0] tbl_data
);

  logic [ENTRY_W-1:0] bb_douta, ov_douta, q_off;
  logic               bb_en, ov_en, cnt_clr, cnt_inc, hit_st;
  logic [OV_AW-1:0]   ov_addra;
  logic [VADR_W-1:0]  wr_vadr;

  lut_bram #(.DEPTH(BB_DEPTH), .WIDTH(ENTRY_W)) u_backbone (
    .clk,
    .rd_en   (bb_en),
    .rd_addr (init_index[BB_AW-1:0]),
    .rd_data (bb_douta),
    .wr_en   (tbl_we && !tbl_sel),
    .wr_addr (tbl_addr[BB_AW-1:0]),
    .wr_data (tbl_data)
  );

  lut_bram #(.DEPTH(OV_DEPTH), .WIDTH(ENTRY_W)) u_overflow (
    .clk,
    .rd_en   (ov_en),
    .rd_addr (ov_addra),
    .rd_data (ov_douta),
    .wr_en   (tbl_we && tbl_sel),
    .wr_addr (tbl_addr[OV_AW-1:0]),
    .wr_data (tbl_data)
  );

  hitter_fsm #(.OV_AW(OV_AW)) u_fsm (
    .clk, .reset, .start,
    .bb_douta (entry_t'(bb_douta)),
    .ov_douta (entry_t'(ov_douta)),
    .mc_stall,
    .bb_en, .ov_en, .ov_addra,
    .cnt_clr, .cnt_inc, .hit_st, .q_off,
    .ended, .state
  );

  hits_counter #(.CNT_W(CNT_W)) u_count (
    .clk, .reset,
    .clr   (cnt_clr),
    .inc   (cnt_inc),
    .count (num_of_hits)
  );

  wr_addr_gen #(.AW(VADR_W)) u_addr (
    .clk, .reset,
    .load     (cnt_clr),
    .mem_base,
    .adv      (hit_st),
    .vadr     (wr_vadr)
  );

  always_comb begin
    mc_req.st   = hit_st;
    mc_req.vadr = wr_vadr;
    mc_req.wrd  = make_pair(s_off, q_off);
  end

endmodule
