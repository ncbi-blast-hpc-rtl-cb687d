// aeg_regs: application engine general registers of the personality.
//
// Four 64-bit registers at AEG indices 0 (Init_index, the subject word in its
// 16 low bits), 1 (mem_base, where the hit pairs are stored), 2 (s_off, the
// subject offset of the word) and 30 (Hits_num, the hit count of the last
// lookup). The dispatch side writes them with wr_en/wr_idx/wr_data and reads
// them with rd_en/rd_idx; the read data appears on ret_data one cycle later
// with ret_vld. An index that does not exist reads as zero (the decoder raises
// the exception). hits_we stores the hitter's count into Hits_num; it wins
// over a dispatch write to index 30 in the same cycle. Reset clears all four.
//
// From the source design: the register map (table of AEG registers: indices,
// names and meanings) and Hits_num being written by the control FSM when the
// hitter ends. The 64-bit width, the read timing and the zero read of a missing
// index are this design's choices.
module aeg_regs
  import blast_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 wr_en,
  input  logic [AEG_IDX_W-1:0] wr_idx,
  input  logic [DATA_W-1:0]    wr_data,
  input  logic                 rd_en,
  input  logic [AEG_IDX_W-1:0] rd_idx,
  output logic [DATA_W-1:0]    ret_data,
  output logic                 ret_vld,
  input  logic                 hits_we,
  input  logic [DATA_W-1:0]    hits_val,
  output logic [WORD_W-1:0]    init_index,
  output logic [VADR_W-1:0]    mem_base,
  output logic [SOFF_W-1:0]    s_off,
  output logic [DATA_W-1:0]    hits_num
);

  logic [DATA_W-1:0] r_init, r_base, r_soff, r_hits;
  logic [DATA_W-1:0] rd_mux;

  always_ff @(posedge clk) begin
    if (reset) begin
      r_init <= '0;
      r_base <= '0;
      r_soff <= '0;
      r_hits <= '0;
    end else begin
      if (wr_en && wr_idx == AEG_IDX_W'(AEG_INIT_IDX)) r_init <= wr_data;
      if (wr_en && wr_idx == AEG_IDX_W'(AEG_MEM_BASE)) r_base <= wr_data;
      if (wr_en && wr_idx == AEG_IDX_W'(AEG_S_OFF))    r_soff <= wr_data;
      if (hits_we)                                      r_hits <= hits_val;
      else if (wr_en && wr_idx == AEG_IDX_W'(AEG_HITS_NUM)) r_hits <= wr_data;
    end
  end

  always_comb begin
    unique case (rd_idx)
      AEG_IDX_W'(AEG_INIT_IDX): rd_mux = r_init;
      AEG_IDX_W'(AEG_MEM_BASE): rd_mux = r_base;
      AEG_IDX_W'(AEG_S_OFF):    rd_mux = r_soff;
      AEG_IDX_W'(AEG_HITS_NUM): rd_mux = r_hits;
      default:                  rd_mux = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      ret_data <= '0;
      ret_vld  <= 1'b0;
    end else begin
      ret_vld <= rd_en;
      if (rd_en) ret_data <= rd_mux;
    end
  end

  assign init_index = r_init[WORD_W-1:0];
  assign mem_base   = r_base[VADR_W-1:0];
  assign s_off      = r_soff[SOFF_W-1:0];
  assign hits_num   = r_hits;

endmodule
