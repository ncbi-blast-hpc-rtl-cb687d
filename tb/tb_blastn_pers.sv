// tb_blastn_pers: end-to-end testbench of the BLASTn seeding personality.
//
// Runs the design at its default sizes (two 65536 x 16 tables). It builds the
// tables of a random 782-residue query, loads them, and then acts as the host:
// it scans a 3000-residue subject that contains pieces of the query, and for
// every word at stride 4 it issues AEG writes of the word, mem_base and s_off,
// caep00, and an AEG read of the hit count, exactly as one coprocessor call.
// A memory model behind the eight MC ports records every write, stalling
// ports at random in the second half of the scan.
//
// Checked: every returned count, every offset pair at its address and on the
// MC port that owns it, no stray writes, the call duration (stall cycles) in
// the half without memory stalls, and the two exceptions (invalid AEG index,
// unimplemented instruction). Each mechanism must occur at least once: words
// with no, one and several hits, dispatch stall, memory stall, use of all
// eight MC ports, and both exceptions.
`timescale 1ns/1ps
module tb_blastn_pers;
  import blast_pkg::*;
  import seed_model_pkg::*;

  localparam int QLEN = 782;
  localparam int SLEN = 3000;

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
  bit mem_stall_mode = 0;
  logic [63:0] memory [logic [47:0]];
  int n_writes = 0, n_bad_port = 0;
  int port_used [NUM_MC];
  int n_none = 0, n_single = 0, n_multi = 0, n_mem_stall = 0, n_disp_stall = 0;
  int n_exc_idx = 0, n_exc_unimp = 0;

  always #5 clk = ~clk;

  // Memory model behind the MC ports.
  always @(posedge clk) begin
    for (int m = 0; m < NUM_MC; m++)
      if (mc_req[m].st && !reset) begin
        if (mc_rq_stall[m]) n_bad_port++;
        if (int'(mc_req[m].vadr[8:6]) != m) n_bad_port++;
        if (memory.exists(mc_req[m].vadr)) n_bad_port++;
        memory[mc_req[m].vadr] = mc_req[m].wrd;
        n_writes++;
        port_used[m]++;
      end
    if (hitter_state inside {H_CK_INDEX, H_CK_OVF} && (|mc_rq_stall) &&
        dut.hit_req.vadr[8:6] inside {[0:7]} && mc_rq_stall[dut.hit_req.vadr[8:6]])
      n_mem_stall++;
    if (cae_stall) n_disp_stall++;
    if (!reset && cae_exception[EXC_BAD_IDX]) n_exc_idx++;
    if (!reset && cae_exception[EXC_UNIMP]) n_exc_unimp++;
    mc_rq_stall <= mem_stall_mode ? NUM_MC'($urandom) & NUM_MC'($urandom) : '0;
  end

  initial begin
    #(50_000_000);
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

  // One instruction on the dispatch port, held back while the engine stalls.
  task automatic issue(opcode_e op, int unsigned idx, logic [63:0] data = '0);
    while (cae_stall) @(posedge clk);
    cae_inst     <= {op, 10'b0, 18'(idx)};
    cae_data     <= data;
    cae_inst_vld <= 1;
    @(posedge clk);
    cae_inst_vld <= 0;
  endtask

  // One coprocessor call for a word; returns the count read back from AEG 30.
  task automatic call(logic [15:0] w, logic [31:0] so, logic [47:0] base, output int unsigned cnt,
                      output int busy);
    issue(OP_AEG_WR, AEG_INIT_IDX, 64'(w));
    issue(OP_AEG_WR, AEG_MEM_BASE, 64'(base));
    issue(OP_AEG_WR, AEG_S_OFF, 64'(so));
    issue(OP_CAEP, 0);
    busy = 0;
    while (cae_stall || busy == 0) begin
      #1;
      if (cae_stall) busy++;
      @(posedge clk);
    end
    issue(OP_AEG_RD, AEG_HITS_NUM);
    do @(posedge clk); while (!cae_ret_data_vld);
    cnt = int'(cae_ret_data);
  endtask

  logic [1:0] q [];
  logic [1:0] s [];
  initial begin
    logic [47:0] base;
    int unsigned cnt;
    int busy, ncalls;
    q = new[QLEN];
    s = new[SLEN];
    foreach (q[i]) q[i] = 2'($urandom_range(0, 3));
    for (int i = 0; i < 40; i++) q[500 + i] = q[100 + i];
    for (int i = 0; i < 30; i++) q[700 + i] = 2'd0;
    foreach (s[i]) s[i] = 2'($urandom_range(0, 3));
    for (int k = 0; k < 10; k++) begin
      automatic int qs = $urandom_range(0, QLEN - 60), ss = 200 + k * 270;
      for (int i = 0; i < 60; i++) s[ss + i] = q[qs + i];
    end
    for (int i = 0; i < 24; i++) s[2900 + i] = 2'd0;
    build(q);

    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    check(cae_idle && !cae_stall && cae_aeg_cnt == 18'(AEG_CNT), "idle after reset");
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < NWORDS; a++) begin
        tbl_we <= 1; tbl_sel <= t[0]; tbl_addr <= 16'(a);
        tbl_data <= t == 0 ? bb[a] : ov[a];
        @(posedge clk);
      end
    tbl_we <= 0;
    @(posedge clk);

    // Exceptions: an AEG index that does not exist, a custom instruction other than 0.
    issue(OP_AEG_WR, 5, 64'h55);
    issue(OP_CAEP, 3);
    issue(OP_NOP, 0);
    check(cae_idle, "no call started by a bad instruction");

    base = 48'h0000_2000_0000;
    ncalls = 0;
    for (int so = 0; so + 8 <= SLEN; so += 4) begin
      automatic logic [15:0] w = word_at(s, so);
      automatic offq_t exp = occ[w];
      mem_stall_mode = so >= SLEN / 2;
      call(w, 32'(so), base, cnt, busy);
      ncalls++;
      check(cnt == exp.size(), $sformatf("count s_off=%0d got %0d want %0d", so, cnt, exp.size()));
      if (!mem_stall_mode)
        check(busy == latency(exp.size()) + 1, $sformatf("call length s_off=%0d n=%0d got %0d", so, exp.size(), busy));
      foreach (exp[k]) begin
        automatic logic [47:0] a = base + 48'(8 * k);
        check(memory.exists(a) && memory[a] == {32'(so), 16'b0, 16'(exp[k])},
              $sformatf("pair s_off=%0d k=%0d", so, k));
      end
      if (exp.size() == 0) n_none++; else if (exp.size() == 1) n_single++; else n_multi++;
      base += 48'(8 * exp.size());
    end
    check(n_writes == memory.size(), "every write to a new address");
    check(48'(n_writes) * 48'd8 == base - 48'h0000_2000_0000, $sformatf("no stray writes: %0d written, %0d expected", n_writes, (base - 48'h0000_2000_0000) / 8));
    check(n_bad_port == 0, "writes only on the owning, unstalled port");

    // Mechanisms.
    check(n_none > 0, "word with no hit");
    check(n_single > 0, "word with one hit");
    check(n_multi > 0, "word with an overflow list");
    check(n_disp_stall > 0, "dispatch stall");
    check(n_mem_stall > 0, "memory stall");
    foreach (port_used[m]) check(port_used[m] > 0, $sformatf("MC port %0d used", m));
    check(n_exc_idx == 1, "invalid index exception");
    check(n_exc_unimp == 1, "unimplemented instruction exception");
    check(csr_exc_sticky == 16'h0003, "sticky exception status");
    $display("calls=%0d none=%0d single=%0d multi=%0d writes=%0d mem_stall=%0d disp_stall=%0d",
             ncalls, n_none, n_single, n_multi, n_writes, n_mem_stall, n_disp_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
