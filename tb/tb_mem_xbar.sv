// tb_mem_xbar: self-checking testbench of the memory crossbar.
//
// Sends requests with random addresses and random per-port stalls and checks
// that exactly the port given by address bits 8:6 sees the store, that the
// address and data reach it unchanged, and that the requester sees that
// port's stall.
`timescale 1ns/1ps
module tb_mem_xbar;
  import blast_pkg::*;
  mc_req_t req;
  logic stall;
  mc_req_t [NUM_MC-1:0] mc_req;
  logic [NUM_MC-1:0] mc_stall;
  int checks = 0, failures = 0;
  int hits_per_port [NUM_MC];

  mem_xbar dut (.*);

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
    for (int i = 0; i < 2000; i++) begin
      int p;
      req.st   = $urandom_range(0, 1);
      req.vadr = {16'($urandom), 32'($urandom)};
      req.wrd  = {$urandom, $urandom};
      mc_stall = 8'($urandom);
      #1;
      p = int'(req.vadr[8:6]);
      check(stall == mc_stall[p], "stall select");
      for (int m = 0; m < NUM_MC; m++) begin
        check(mc_req[m].st == (req.st && m == p), $sformatf("st port %0d", m));
        if (mc_req[m].st) begin
          check(mc_req[m].vadr == req.vadr && mc_req[m].wrd == req.wrd, "payload");
          hits_per_port[m]++;
        end
      end
      #9;
    end
    foreach (hits_per_port[m]) check(hits_per_port[m] > 0, $sformatf("port %0d used", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
