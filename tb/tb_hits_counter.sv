// tb_hits_counter: self-checking testbench of the hit counter.
//
// Drives random clear and increment pulses and compares the count with a
// reference count after every cycle; clear must win over increment.
`timescale 1ns/1ps
module tb_hits_counter;
  logic clk = 0, reset = 1, clr = 0, inc = 0;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  hits_counter dut (.*);
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
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      automatic logic c = ($urandom_range(0, 40) == 0), n = $urandom_range(0, 1);
      clr <= c; inc <= n;
      @(posedge clk);
      if (c) model = 0; else if (n) model = (model + 1) & 16'hFFFF;
      #1;
      checks++;
      if (count != 16'(model)) begin failures++; $display("FAIL count %0d vs %0d", count, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
