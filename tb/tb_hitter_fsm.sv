// tb_hitter_fsm: self-checking testbench of the hitter control FSM.
//
// The two table memories are modelled here (one-cycle read with enable) over
// small hand-made tables: 64 words, each with no entry, one query offset, or
// an overflow list of 2 to 6 offsets. For each word the testbench checks the
// start actions (bb_en, cnt_clr), the query offsets issued with hit_st, the
// number of cnt_inc pulses, the state sequence and the cycle at which ended
// pulses, first without and then with random memory stalls.
`timescale 1ns/1ps
module tb_hitter_fsm;
  import blast_pkg::*;

  logic clk = 0, reset = 1, start = 0, mc_stall = 0;
  entry_t bb_douta, ov_douta;
  logic bb_en, ov_en, cnt_clr, cnt_inc, hit_st, ended;
  logic [15:0] ov_addra;
  logic [15:0] q_off;
  hit_state_e state;

  logic [15:0] bb_t [64];
  logic [15:0] ov_t [65536];
  int unsigned lists [64][$];
  logic [5:0] word = '0;
  int checks = 0, failures = 0;
  bit stall_mode = 0;
  int seen_state [4];

  hitter_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (bb_en) bb_douta <= entry_t'(bb_t[word]);
    if (ov_en) ov_douta <= entry_t'(ov_t[ov_addra]);
    if (stall_mode) mc_stall <= $urandom_range(0, 1);
    seen_state[state]++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #(2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [5:0] w);
    int k, incs, edges;
    word <= w;
    start <= 1;
    #1;
    check(bb_en && cnt_clr, "start actions");
    @(posedge clk);
    edges = 1;
    start <= 0;
    k = 0; incs = 0;
    #1;
    while (!ended && edges < 500) begin
      if (hit_st) begin
        check(!mc_stall, "no write into a stall");
        if (k < lists[w].size()) check(q_off == 16'(lists[w][k]), $sformatf("offset w=%0d k=%0d", w, k));
        k++;
      end
      if (cnt_inc) incs++;
      @(posedge clk); #1;
      edges++;
    end
    check(k == lists[w].size() && incs == k, $sformatf("hits w=%0d got %0d want %0d", w, k, lists[w].size()));
    if (!stall_mode)
      check(edges == ((lists[w].size() <= 1) ? 2 : lists[w].size() + 4),
            $sformatf("latency w=%0d got %0d", w, edges));
    check(state == H_IDLE, "back in IDLE");
    @(posedge clk);
  endtask

  initial begin
    int base = 2;
    foreach (ov_t[i]) ov_t[i] = 16'hFFFF;
    for (int w = 0; w < 64; w++) begin
      automatic int n = (w % 3 == 0) ? 0 : (w % 3 == 1) ? 1 : $urandom_range(2, 6);
      for (int k = 0; k < n; k++) lists[w].push_back($urandom_range(0, 781));
      if (n == 0) bb_t[w] = 16'hFFFF;
      else if (n == 1) bb_t[w] = 16'(lists[w][0]);
      else begin
        bb_t[w] = 16'(-base);
        for (int k = 0; k < n; k++) ov_t[base + k] = 16'(lists[w][k]);
        base += n + 1;
      end
    end
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      stall_mode = pass[0];
      if (!stall_mode) mc_stall <= 0;
      for (int w = 0; w < 64; w++) run(6'(w));
    end
    foreach (seen_state[s]) check(seen_state[s] > 0, $sformatf("state %0d visited", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
