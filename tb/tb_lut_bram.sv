// tb_lut_bram: self-checking testbench of the lookup-table block RAM.
//
// Loads random words at random addresses of a full 65536 x 16 memory, reads
// them back (data one cycle after rd_en), and checks that rd_data holds its
// value while rd_en is low even when the address changes.
`timescale 1ns/1ps
module tb_lut_bram;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [15:0] rd_addr = '0, wr_addr = '0;
  logic [15:0] rd_data, wr_data = '0;
  int checks = 0, failures = 0;
  logic [15:0] ref_mem [int];
  int unsigned addrs [$];

  lut_bram dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic logic [15:0] a = 16'($urandom), d = 16'($urandom);
      if (!ref_mem.exists(a)) addrs.push_back(a);
      ref_mem[a] = d;
      wr_en <= 1; wr_addr <= a; wr_data <= d;
      @(posedge clk);
    end
    wr_en <= 0;
    foreach (addrs[i]) begin
      rd_en <= 1; rd_addr <= 16'(addrs[i]);
      @(posedge clk);
      rd_en <= 0; rd_addr <= 16'(addrs[(i + 1) % addrs.size()]);
      #1 check(rd_data == ref_mem[addrs[i]], $sformatf("read %h", addrs[i]));
      @(posedge clk);
      #1 check(rd_data == ref_mem[addrs[i]], $sformatf("hold %h", addrs[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
