// tb_aeg_regs: self-checking testbench of the AEG register file.
//
// Writes random values to the four registers and to missing indices, reads
// every index back (data one cycle after rd_en, missing ones read zero),
// checks the direct outputs (16-bit word, 48-bit base, 32-bit offset) and that
// a hitter count store wins over a dispatch write to index 30.
`timescale 1ns/1ps
module tb_aeg_regs;
  import blast_pkg::*;
  logic clk = 0, reset = 1;
  logic wr_en = 0, rd_en = 0, hits_we = 0;
  logic [AEG_IDX_W-1:0] wr_idx = '0, rd_idx = '0;
  logic [63:0] wr_data = '0, hits_val = '0, ret_data, hits_num;
  logic ret_vld;
  logic [15:0] init_index;
  logic [47:0] mem_base;
  logic [31:0] s_off;
  logic [63:0] model [int];
  int checks = 0, failures = 0;
  int idxs [6] = '{0, 1, 2, 30, 3, 31};

  aeg_regs dut (.*);
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
    foreach (idxs[i]) model[idxs[i]] = '0;
    repeat (2) @(posedge clk);
    reset <= 0;
    for (int r = 0; r < 200; r++) begin
      automatic int i = idxs[$urandom_range(0, 5)];
      automatic logic [63:0] d = {$urandom, $urandom};
      automatic logic hw = (i == 30) && $urandom_range(0, 1);
      automatic logic [63:0] hv = {$urandom, $urandom};
      wr_en <= 1; wr_idx <= AEG_IDX_W'(i); wr_data <= d;
      hits_we <= hw; hits_val <= hv;
      @(posedge clk);
      wr_en <= 0; hits_we <= 0;
      if (aeg_idx_valid(AEG_IDX_W'(i))) model[i] = hw ? hv : d;
      foreach (idxs[j]) begin
        rd_en <= 1; rd_idx <= AEG_IDX_W'(idxs[j]);
        @(posedge clk);
        rd_en <= 0;
        #1 check(ret_vld && ret_data == model[idxs[j]], $sformatf("read %0d", idxs[j]));
      end
      check(init_index == model[0][15:0] && mem_base == model[1][47:0] &&
            s_off == model[2][31:0] && hits_num == model[30], "direct outputs");
      @(posedge clk);
      #1 check(!ret_vld, "ret_vld is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
