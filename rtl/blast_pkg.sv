// blast_pkg: types and constants shared by the BLASTn seeding personality.
//
// The personality looks up 16-bit subject words (eight 2-bit nucleotides) in
// two query tables, the backbone and the overflow table, and writes one 64-bit
// query/subject offset pair per hit to coprocessor memory. This package holds
// the table encoding, the AEG register map, the instruction encoding seen on
// the dispatch port and the memory request bundle.
//
// From the source design: table sizes (65536 x 16), the table value encoding
// (-1 empty, >= 0 single offset, <= -2 overflow pointer), the AEG indices 0, 1,
// 2 and 30, the 32-bit subject offset and the layout of an offset pair
// {s_off, 16'b0, query offset}. The instruction encoding and the widths of the
// dispatch and memory buses are this design's own choices.
package blast_pkg;

  // Lookup tables: one entry per 16-bit word, 16-bit signed entries.
  localparam int unsigned WORD_W  = 16;   // 8 residues x 2 bits
  localparam int unsigned ENTRY_W = 16;   // table entry width
  localparam int unsigned SOFF_W  = 32;   // subject offset width
  localparam int unsigned VADR_W  = 48;   // virtual address width
  localparam int unsigned DATA_W  = 64;   // AEG, dispatch data and memory data width
  localparam int unsigned NUM_MC  = 8;    // memory controllers behind the crossbar
  localparam int unsigned PAIR_BYTES = 8; // one offset pair is one quad word

  typedef logic signed [ENTRY_W-1:0] entry_t;
  localparam entry_t ENTRY_NONE = -16'sd1;  // "no (more) occurrences"

  // AEG register map.
  localparam int unsigned AEG_IDX_W     = 18;
  localparam int unsigned AEG_INIT_IDX  = 0;   // Init_index
  localparam int unsigned AEG_MEM_BASE  = 1;   // mem_base
  localparam int unsigned AEG_S_OFF     = 2;   // s_off
  localparam int unsigned AEG_HITS_NUM  = 30;  // Hits_num
  localparam int unsigned AEG_CNT       = 31;  // reported on cae_aeg_cnt

  // Dispatch instruction word (this design's encoding):
  //   [31:28] opcode, [17:0] AEG index or custom instruction number.
  typedef enum logic [3:0] {
    OP_NOP     = 4'h0,
    OP_AEG_WR  = 4'h1,   // AEG[idx] <= cae_data
    OP_AEG_RD  = 4'h2,   // return AEG[idx] on cae_ret_data
    OP_CAEP    = 4'h3    // custom instruction number idx[4:0]
  } opcode_e;

  typedef struct packed {
    opcode_e              op;
    logic [9:0]           rsvd;
    logic [AEG_IDX_W-1:0] idx;
  } cae_inst_t;

  // Exception vector bits (16 bits, {14'b0, invalid_index, unimp_instr}).
  localparam int unsigned EXC_W        = 16;
  localparam int unsigned EXC_UNIMP    = 0;
  localparam int unsigned EXC_BAD_IDX  = 1;

  // One write request towards the memory crossbar / one MC port.
  typedef struct packed {
    logic              st;     // store request valid
    logic [VADR_W-1:0] vadr;   // byte virtual address (quad-word aligned)
    logic [DATA_W-1:0] wrd;    // write data
  } mc_req_t;

  // Hitter FSM states and CAE control FSM states.
  typedef enum logic [1:0] {
    H_IDLE     = 2'd0,
    H_CK_INDEX = 2'd1,   // backbone entry on bb_douta
    H_HAVE_OVF = 2'd2,   // first overflow read in flight
    H_CK_OVF   = 2'd3    // overflow entry on ov_douta, one per cycle
  } hit_state_e;

  typedef enum logic [1:0] {
    C_IDLE      = 2'd0,
    C_COUNT     = 2'd1,
    C_AEG_STORE = 2'd2
  } cae_state_e;

  // AEG indices that exist; any other index raises the invalid-index exception.
  function automatic logic aeg_idx_valid(logic [AEG_IDX_W-1:0] idx);
    return idx == AEG_IDX_W'(AEG_INIT_IDX) || idx == AEG_IDX_W'(AEG_MEM_BASE) ||
           idx == AEG_IDX_W'(AEG_S_OFF)    || idx == AEG_IDX_W'(AEG_HITS_NUM);
  endfunction

  // Offset pair layout: subject offset, zero upper half, query offset.
  function automatic logic [DATA_W-1:0] make_pair(logic [SOFF_W-1:0] s_off,
                                                  logic [ENTRY_W-1:0] q_off);
    return {s_off, 16'b0, q_off};
  endfunction

  // Memory controller selected by binary interleave: address bits 8:6.
  function automatic logic [2:0] mc_of(logic [VADR_W-1:0] vadr);
    return vadr[8:6];
  endfunction

endpackage
