// tb_cae_fsm: self-checking testbench of the CAE control FSM.
//
// Issues caep00 and answers with an ended pulse after a random delay (a
// stand-in for the hitter). Checks the start pulse, the state sequence
// IDLE -> COUNT -> AEG_STORE -> IDLE, one hits_we per call, stall and idle in
// every cycle, that caep00 while busy starts nothing, and that stall lasts the
// hitter's latency plus one cycle.
`timescale 1ns/1ps
module tb_cae_fsm;
  import blast_pkg::*;
  logic clk = 0, reset = 1, caep00 = 0, hitter_ended = 0;
  logic hitter_start, hits_we, cae_stall, cae_idle;
  cae_state_e state;
  int checks = 0, failures = 0;

  cae_fsm dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
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
    @(posedge clk);
    for (int c = 0; c < 300; c++) begin
      automatic int lat = $urandom_range(2, 12), stall_cycles = 0, we = 0;
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1 check(cae_idle && !cae_stall && state == C_IDLE && !hitter_start, "idle");
      end
      caep00 <= 1;
      #1 check(hitter_start, "start with caep00");
      @(posedge clk);
      caep00 <= 0;
      for (int t = 1; t <= lat + 3; t++) begin
        hitter_ended <= (t == lat);
        caep00 <= (t < lat) && $urandom_range(0, 1);   // ignored while busy
        #1;
        check(!hitter_start, "no start while busy");
        if (cae_stall) stall_cycles++;
        check(cae_stall == !cae_idle, "stall/idle");
        if (t < lat) check(state == C_COUNT, "COUNT");
        if (t == lat) check(state == C_COUNT, "COUNT at ended");
        if (t == lat + 1) check(state == C_AEG_STORE && hits_we, "AEG_STORE");
        if (t == lat + 2) check(state == C_IDLE, "back to IDLE");
        if (hits_we) we++;
        @(posedge clk);
      end
      check(we == 1, "one store per call");
      check(stall_cycles == lat + 1, $sformatf("stall length %0d for latency %0d", stall_cycles, lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
