// blastn_pers: BLASTn seeding personality of one application engine.
//
// The host scans a subject (database) sequence and, for every 16-bit word of
// eight nucleotides, hands the word and its subject offset to this engine. The
// engine finds every place the word occurs in the query, using a backbone table
// indexed by the word and an overflow table of offset lists, and stores each
// hit as a 64-bit pair {subject offset, 16'b0, query offset} in coprocessor
// memory for the extension step; it returns the number of hits.
//
// One call from the host is a short instruction sequence on the dispatch port:
//   AEG write 0 (the word), AEG write 1 (mem_base), AEG write 2 (s_off),
//   caep00 (start), and after cae_stall falls, AEG read 30 (hit count).
// The instruction decoder moves data to and from the AEG registers and starts
// the CAE control FSM, which runs the hitter and stores its count. Hit pairs
// leave through the memory crossbar to the MC port chosen by address bits 8:6.
//
// Ports: the dispatch side (cae_*), the eight MC write ports (mc_req,
// mc_rq_stall), the table load port (tbl_*), and status for a management/CSR
// agent (csr_exc_sticky, cae_state, hitter_state), which is not part of this
// design. Timing per call: see cae_fsm and hitter_fsm.
//
// From the source design: the blocks and how they are wired (decoder, AEG
// registers, CAE FSM, one hitter, crossbar), the AEG register map and the
// caep00 instruction. The instruction encoding, the table load port and the
// stall on the MC ports are this design's own.
module blastn_pers
  import blast_pkg::*;
#(
  parameter int unsigned BB_DEPTH = 65536,
  parameter int unsigned OV_DEPTH = 65536,
  localparam int unsigned TBL_AW  = $clog2((BB_DEPTH > OV_DEPTH) ? BB_DEPTH : OV_DEPTH)
) (
  input  logic                 clk,
  input  logic                 reset,
  // dispatch interface side
  input  logic [31:0]          cae_inst,
  input  logic [DATA_W-1:0]    cae_data,
  input  logic                 cae_inst_vld,
  output logic [DATA_W-1:0]    cae_ret_data,
  output logic                 cae_ret_data_vld,
  output logic                 cae_stall,
  output logic                 cae_idle,
  output logic [EXC_W-1:0]     cae_exception,
  output logic [AEG_IDX_W-1:0] cae_aeg_cnt,
  // memory controller write ports
  output mc_req_t [NUM_MC-1:0] mc_req,
  input  logic    [NUM_MC-1:0] mc_rq_stall,
  // query table load port
  input  logic                 tbl_we,
  input  logic                 tbl_sel,
  input  logic [TBL_AW-1:0]    tbl_addr,
  input  logic [ENTRY_W-1:0]   tbl_data,
  // status for a management agent
  output logic [EXC_W-1:0]     csr_exc_sticky,
  output cae_state_e           cae_state,
  output hit_state_e           hitter_state
);

  logic                 aeg_wr_en, aeg_rd_en, caep00;
  logic [AEG_IDX_W-1:0] aeg_idx;
  logic                 hitter_start, hitter_ended, hits_we;
  logic [15:0]          num_of_hits;
  logic [WORD_W-1:0]    init_index;
  logic [VADR_W-1:0]    mem_base;
  logic [SOFF_W-1:0]    s_off;
  mc_req_t              hit_req;
  logic                 hit_stall;

  inst_decoder u_dec (
    .clk, .reset,
    .cae_inst, .cae_inst_vld,
    .aeg_wr_en, .aeg_rd_en, .aeg_idx, .caep00,
    .cae_exception
  );

  aeg_regs u_aeg (
    .clk, .reset,
    .wr_en    (aeg_wr_en),
    .wr_idx   (aeg_idx),
    .wr_data  (cae_data),
    .rd_en    (aeg_rd_en),
    .rd_idx   (aeg_idx),
    .ret_data (cae_ret_data),
    .ret_vld  (cae_ret_data_vld),
    .hits_we,
    .hits_val (DATA_W'(num_of_hits)),
    .init_index, .mem_base, .s_off,
    .hits_num ()
  );

  cae_fsm u_cae (
    .clk, .reset, .caep00,
    .hitter_ended,
    .hitter_start, .hits_we,
    .cae_stall, .cae_idle,
    .state (cae_state)
  );

  hitter #(.BB_DEPTH(BB_DEPTH), .OV_DEPTH(OV_DEPTH)) u_hitter (
    .clk, .reset,
    .start       (hitter_start),
    .init_index, .s_off, .mem_base,
    .ended       (hitter_ended),
    .num_of_hits,
    .state       (hitter_state),
    .mc_req      (hit_req),
    .mc_stall    (hit_stall),
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_data
  );

  mem_xbar u_xbar (
    .req      (hit_req),
    .stall    (hit_stall),
    .mc_req,
    .mc_stall (mc_rq_stall)
  );

  assign cae_aeg_cnt = AEG_IDX_W'(AEG_CNT);

  // Exceptions seen since reset, for inspection over the management path.
  always_ff @(posedge clk) begin
    if (reset) csr_exc_sticky <= '0;
    else       csr_exc_sticky <= csr_exc_sticky | cae_exception;
  end

  // The dispatch interface does not hand over instructions while stalled.
  assert property (@(posedge clk) disable iff (reset) cae_stall |-> !cae_inst_vld);

endmodule
