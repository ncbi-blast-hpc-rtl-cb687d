// tb_workload_blastn: the two smaller evaluated workloads, run end to end.
//
// A 782-residue query (random residues, as the evaluated query itself is not
// available) is loaded into the personality at its default sizes. Two
// databases of the evaluated sizes are then scanned as the host would, one
// coprocessor call per 8-residue word at stride 4, restarting the subject
// offset at 0 for every sequence:
//   test_db       6 sequences, 4309 residues in all (lengths 711, 711, 711,
//                 720, 728, 728: only the totals are known);
//   testdb_large  1 sequence of 3,756,989 residues.
// The call counts must come out at 1069 and 939,246. Every returned hit count
// is compared with the query's word index, and every pair written to memory is
// checked at the end. The memory ports stall at random. Run time is a few
// minutes, dominated by the 939,246 calls of testdb_large.
`timescale 1ns/1ps
module tb_workload_blastn;
  import blast_pkg::*;
  import seed_model_pkg::*;

  localparam int QLEN = 782;

  logic clk = 0, reset = 1;
  logic [31:0] cae_inst = '0;
  logic [63:0] cae_data = '0;
  logic cae_inst_vld = 0;
  logic [63:0] cae_ret_data;
  logic cae_ret_data_vld, cae_stall, cae_idle;
  logic [15:0] cae_exception;
  logic [17:0] cae_aeg_cnt;
  mc_req_t [NUM_MC-1:0] mc_req;
  logic [NUM_MC-1:0] mc_rq_stall = '0;
  logic tbl_we = 0, tbl_sel = 0;
  logic [15:0] tbl_addr = '0, tbl_data = '0;
  logic [15:0] csr_exc_sticky;
  cae_state_e cae_state;
  hit_state_e hitter_state;

  blastn_pers dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] memory [logic [47:0]];
  longint n_writes = 0;
  longint cycles = 0;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    for (int m = 0; m < NUM_MC; m++)
      if (mc_req[m].st && !reset) begin
        memory[mc_req[m].vadr] = mc_req[m].wrd;
        n_writes++;
      end
    mc_rq_stall <= NUM_MC'($urandom) & NUM_MC'($urandom) & NUM_MC'($urandom);
  end

  initial begin
    #(2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic issue(opcode_e op, int unsigned idx, logic [63:0] data = '0);
    while (cae_stall) @(posedge clk);
    cae_inst     <= {op, 10'b0, 18'(idx)};
    cae_data     <= data;
    cae_inst_vld <= 1;
    @(posedge clk);
    cae_inst_vld <= 0;
  endtask

  task automatic call(logic [15:0] w, logic [31:0] so, logic [47:0] base, output int unsigned cnt);
    issue(OP_AEG_WR, AEG_INIT_IDX, 64'(w));
    issue(OP_AEG_WR, AEG_MEM_BASE, 64'(base));
    issue(OP_AEG_WR, AEG_S_OFF, 64'(so));
    issue(OP_CAEP, 0);
    @(posedge clk);
    issue(OP_AEG_RD, AEG_HITS_NUM);
    do @(posedge clk); while (!cae_ret_data_vld);
    cnt = int'(cae_ret_data);
  endtask

  // Pairs expected in memory, checked after the scan.
  typedef struct { logic [47:0] a; logic [63:0] d; } pair_t;
  pair_t expected [$];

  // Scans one subject sequence; returns the number of calls.
  task automatic scan(const ref logic [1:0] s[], inout logic [47:0] base, output int ncalls);
    int unsigned cnt;
    ncalls = 0;
    for (int so = 0; so + 8 <= s.size(); so += 4) begin
      automatic logic [15:0] w = word_at(s, so);
      call(w, 32'(so), base, cnt);
      ncalls++;
      check(cnt == occ[w].size(), $sformatf("count s_off=%0d got %0d want %0d", so, cnt, occ[w].size()));
      foreach (occ[w][k]) expected.push_back('{base + 48'(8 * k), {32'(so), 16'b0, 16'(occ[w][k])}});
      base += 48'(8 * occ[w].size());
    end
  endtask

  logic [1:0] q [];
  logic [1:0] s [];
  int lens_small [6] = '{711, 711, 711, 720, 728, 728};
  initial begin
    logic [47:0] base;
    int n, calls_small, calls_large, letters;
    longint c0;
    q = new[QLEN];
    foreach (q[i]) q[i] = 2'($urandom_range(0, 3));
    build(q);
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < NWORDS; a++) begin
        tbl_we <= 1; tbl_sel <= t[0]; tbl_addr <= 16'(a);
        tbl_data <= t == 0 ? bb[a] : ov[a];
        @(posedge clk);
      end
    tbl_we <= 0;
    @(posedge clk);

    // test_db: sequences partly drawn from the query so that hits occur.
    base = 48'h0001_0000_0000;
    calls_small = 0; letters = 0;
    foreach (lens_small[i]) begin
      s = new[lens_small[i]];
      foreach (s[j]) s[j] = 2'($urandom_range(0, 3));
      for (int j = 0; j < 100; j++) s[50 + j] = q[200 + 50 * i + j];
      scan(s, base, n);
      calls_small += n;
      letters += lens_small[i];
    end
    check(letters == 4309, "test_db letters");
    check(calls_small == 1069, $sformatf("test_db calls %0d", calls_small));

    // testdb_large: one long random sequence.
    s = new[3756989];
    foreach (s[j]) s[j] = 2'($urandom_range(0, 3));
    c0 = cycles;
    scan(s, base, calls_large);
    check(calls_large == 939246, $sformatf("testdb_large calls %0d", calls_large));

    check(n_writes == expected.size(), $sformatf("writes %0d expected %0d", n_writes, expected.size()));
    foreach (expected[i])
      check(memory.exists(expected[i].a) && memory[expected[i].a] == expected[i].d, "pair in memory");
    $display("test_db calls=%0d, testdb_large calls=%0d in %0d cycles (%0.1f cycles per call), pairs=%0d",
             calls_small, calls_large, cycles - c0, real'(cycles - c0) / calls_large, expected.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
