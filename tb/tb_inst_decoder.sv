// tb_inst_decoder: self-checking testbench of the instruction decoder.
//
// Sends random instructions (AEG writes and reads to existing and missing
// indices, caep with number 0 and others, NOPs, unknown opcodes, and idle
// cycles) and compares the decode outputs in the same cycle and the exception
// vector in the next cycle with values worked out here.
`timescale 1ns/1ps
module tb_inst_decoder;
  import blast_pkg::*;
  logic clk = 0, reset = 1;
  logic [31:0] cae_inst = '0;
  logic cae_inst_vld = 0;
  logic aeg_wr_en, aeg_rd_en, caep00;
  logic [AEG_IDX_W-1:0] aeg_idx;
  logic [15:0] cae_exception;
  int checks = 0, failures = 0;
  int n_bad = 0, n_unimp = 0, n_caep = 0;

  inst_decoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [3:0] op = 4'($urandom_range(0, 5));
      logic [17:0] idx;
      automatic logic v = $urandom_range(0, 4) != 0;
      logic good, e_wr, e_rd, e_caep, e_bad, e_unimp;
      case ($urandom_range(0, 3))
        0: idx = 18'd0;
        1: idx = 18'd30;
        2: idx = 18'($urandom_range(0, 3));
        default: idx = 18'($urandom_range(0, 40));
      endcase
      good = (idx == 0 || idx == 1 || idx == 2 || idx == 30);
      e_wr = v && op == 4'h1 && good;
      e_rd = v && op == 4'h2;
      e_caep = v && op == 4'h3 && idx == 0;
      e_bad = v && (op == 4'h1 || op == 4'h2) && !good;
      e_unimp = v && ((op == 4'h3 && idx != 0) || op > 4'h3);
      cae_inst <= {op, 10'($urandom), idx};
      cae_inst_vld <= v;
      #1;
      #1 check(aeg_wr_en == e_wr && aeg_rd_en == e_rd && caep00 == e_caep &&
               (!(e_wr || e_rd) || aeg_idx == idx), $sformatf("decode op=%0d idx=%0d", op, idx));
      @(posedge clk);
      #1 check(cae_exception == {14'b0, e_bad, e_unimp}, $sformatf("exception op=%0d idx=%0d", op, idx));
      n_bad += e_bad; n_unimp += e_unimp; n_caep += e_caep;
    end
    check(n_bad > 0 && n_unimp > 0 && n_caep > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
