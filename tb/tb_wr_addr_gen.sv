// tb_wr_addr_gen: self-checking testbench of the write address generator.
//
// Loads random quad-word aligned bases and advances a random number of times,
// checking that the address is base + 8 x (writes so far), and that load wins
// over an advance in the same cycle.
`timescale 1ns/1ps
module tb_wr_addr_gen;
  logic clk = 0, reset = 1, load = 0, adv = 0;
  logic [47:0] mem_base = '0, vadr;
  logic [47:0] model = '0;
  int checks = 0, failures = 0;

  wr_addr_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk);
    reset <= 0;
    for (int i = 0; i < 3000; i++) begin
      automatic logic l = ($urandom_range(0, 20) == 0), a = $urandom_range(0, 1);
      automatic logic [47:0] b = {16'($urandom), 32'($urandom)} & ~48'h7;
      load <= l; adv <= a; mem_base <= b;
      @(posedge clk);
      if (l) model = b; else if (a) model = model + 48'd8;
      #1;
      checks++;
      if (vadr != model) begin failures++; $display("FAIL vadr %h vs %h", vadr, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
