// inst_decoder: decodes the instructions the dispatch interface hands over.
//
// Each instruction is one 32-bit word (opcode in bits 31:28, AEG index or
// custom instruction number in bits 17:0) valid for one cycle with
// cae_inst_vld. It is decoded in the same cycle:
//   AEG write   -> aeg_wr_en (the data is cae_data), if the index exists;
//   AEG read    -> aeg_rd_en (the register file answers next cycle);
//   caep, #0    -> caep00, the only custom instruction, which starts a lookup;
//   NOP         -> nothing.
// A missing AEG index or any other instruction sets a bit of the 16-bit
// exception vector {14'b0, invalid_index, unimplemented}, which is registered
// and shown on cae_exception for one cycle.
//
// From the source design: the decoder's three jobs (move data to and from the
// AEGs, start the custom instruction, raise exceptions for an invalid AEG index
// and for an unimplemented instruction) and the layout of the exception vector.
// The instruction word format is this design's own; the dispatch interface in
// front of it is not part of this design.
module inst_decoder
  import blast_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  input  logic [31:0]          cae_inst,
  input  logic                 cae_inst_vld,
  output logic                 aeg_wr_en,
  output logic                 aeg_rd_en,
  output logic [AEG_IDX_W-1:0] aeg_idx,
  output logic                 caep00,
  output logic [EXC_W-1:0]     cae_exception
);

  cae_inst_t inst;
  logic      bad_idx, unimp;

  assign inst    = cae_inst_t'(cae_inst);
  assign aeg_idx = inst.idx;

  always_comb begin
    aeg_wr_en = 1'b0;
    aeg_rd_en = 1'b0;
    caep00    = 1'b0;
    bad_idx   = 1'b0;
    unimp     = 1'b0;
    if (cae_inst_vld) begin
      case (inst.op)
        OP_NOP: ;
        OP_AEG_WR: begin
          aeg_wr_en = aeg_idx_valid(inst.idx);
          bad_idx   = !aeg_idx_valid(inst.idx);
        end
        OP_AEG_RD: begin
          aeg_rd_en = 1'b1;
          bad_idx   = !aeg_idx_valid(inst.idx);
        end
        OP_CAEP: begin
          caep00 = (inst.idx == '0);
          unimp  = (inst.idx != '0);
        end
        default: unimp = 1'b1;
      endcase
    end
  end

  logic [EXC_W-1:0] exc_n;
  always_comb begin
    exc_n              = '0;
    exc_n[EXC_BAD_IDX] = bad_idx;
    exc_n[EXC_UNIMP]   = unimp;
  end

  always_ff @(posedge clk) begin
    if (reset) cae_exception <= '0;
    else       cae_exception <= exc_n;
  end

endmodule
