// tb_hitter: self-checking testbench of the hitter processing element.
//
// Builds the backbone and overflow tables of a random 782-residue query (with
// a copied segment and a poly-A run so that words with many occurrences
// exist), loads them through the load port, then looks up words taken from the
// query and random words. For each lookup it checks every write request
// (address mem_base + 8k, data {s_off, 16'b0, query offset}, offsets in list
// order), the final num_of_hits and, in the phase without memory stalls, the
// cycle count from start to ended. A second phase applies random stalls.
`timescale 1ns/1ps
module tb_hitter;
  import blast_pkg::*;
  import seed_model_pkg::*;

  localparam int QLEN = 782;

  logic clk = 0, reset = 1;
  logic start = 0;
  logic [15:0] init_index = '0;
  logic [31:0] s_off = '0;
  logic [47:0] mem_base = '0;
  logic ended;
  logic [15:0] num_of_hits;
  hit_state_e state;
  mc_req_t mc_req;
  logic mc_stall = 0;
  logic tbl_we = 0, tbl_sel = 0;
  logic [15:0] tbl_addr = '0, tbl_data = '0;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_single = 0, n_none = 0, n_multi = 0, n_stalled = 0;
  bit stall_mode = 0;

  hitter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (stall_mode) mc_stall <= ($urandom_range(0, 9) < 4);
  always @(posedge clk) if (mc_stall && state != H_IDLE && state != H_HAVE_OVF) n_stalled++;

  initial begin
    #(20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic load_tables();
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < NWORDS; a++) begin
        tbl_we <= 1; tbl_sel <= t[0]; tbl_addr <= 16'(a);
        tbl_data <= t == 0 ? bb[a] : ov[a];
        @(posedge clk);
      end
    tbl_we <= 0;
    @(posedge clk);
  endtask

  task automatic lookup(logic [15:0] w, logic [31:0] so, logic [47:0] base);
    int k, t0;
    offq_t exp = occ[w];
    init_index <= w; s_off <= so; mem_base <= base;
    start <= 1;
    @(posedge clk);
    t0 = cycle - 1;
    start <= 0;
    k = 0;
    while (!ended) begin
      if (mc_req.st) begin
        if (k < exp.size()) begin
          check(mc_req.vadr == base + 48'(8 * k), $sformatf("vadr w=%h k=%0d", w, k));
          check(mc_req.wrd == {so, 16'b0, 16'(exp[k])}, $sformatf("wrd w=%h k=%0d got %h", w, k, mc_req.wrd));
        end
        k++;
      end
      @(posedge clk);
      if (cycle - t0 > 5000) break;
    end
    check(k == exp.size(), $sformatf("writes w=%h %0d vs %0d", w, k, exp.size()));
    check(num_of_hits == 16'(exp.size()), $sformatf("count w=%h %0d vs %0d", w, num_of_hits, exp.size()));
    if (!stall_mode)
      check(cycle - t0 - 1 == latency(exp.size()), $sformatf("latency w=%h n=%0d got %0d", w, exp.size(), cycle - t0 - 1));
    if (exp.size() == 0) n_none++; else if (exp.size() == 1) n_single++; else n_multi++;
    @(posedge clk);
  endtask

  logic [1:0] q [];
  initial begin
    q = new[QLEN];
    foreach (q[i]) q[i] = 2'($urandom_range(0, 3));
    for (int i = 0; i < 40; i++) q[500 + i] = q[100 + i];
    for (int i = 0; i < 30; i++) q[700 + i] = 2'd0;
    for (int i = 0; i < 20; i++) q[300 + i] = q[100 + i];
    build(q);
    repeat (3) @(posedge clk);
    reset <= 0;
    load_tables();
    for (int pass = 0; pass < 2; pass++) begin
      stall_mode = pass[0];
      if (!stall_mode) mc_stall <= 0;
      lookup(16'h0000, 32'h1234_5678, 48'h0000_1000_0000);  // poly-A word
      for (int i = 0; i < 150; i++) begin
        logic [15:0] w;
        if (i % 3 == 2) w = 16'($urandom);
        else w = word_at(q, $urandom_range(0, QLEN - 8));
        lookup(w, $urandom, {16'h0, $urandom} & ~48'h7);
      end
    end
    check(n_none > 0 && n_single > 0 && n_multi > 0, "all three table cases seen");
    check(n_stalled > 0, "memory stall seen");
    $display("lookups: none=%0d single=%0d multi=%0d stalled cycles=%0d", n_none, n_single, n_multi, n_stalled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
