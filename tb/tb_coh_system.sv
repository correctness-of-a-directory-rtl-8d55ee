// tb_coh_system: end-to-end test of the whole coherence system at its
// default size (three caches, sixteen blocks of four words, four lines per
// cache, eight-slot channels).
//
// Phase 1, serialised traffic: random loads and stores from random
// processors to eight blocks that collide in the caches, one operation at
// a time with the channels drained in between. Every load is compared with
// a reference memory. In this regime the protocol has no races, so it must
// be exactly coherent; the phase exercises hits, misses, upgrades,
// invalidation fan-out, owner write-back on read (UpdM/DxM) and on
// invalidation or eviction (DOxM), and Repl.
//
// Phase 2, races, steered through the channels' hold and select controls:
//  a) a locked entry: the owner's UpdM is held in transit while a third
//     cache asks for the block and is rejected until the entry frees;
//     all readers then see the last store.
//  b) a Repl overtaken by a later ReqSC of the same cache (reordering in
//     the sending channel): the directory loses the copy, a remote store
//     does not invalidate it, and the cache then reads a stale value. The
//     specified protocol behaves this way; the test checks that it does.
//  c) the last sharer leaving by Repl while ownership is pending: its Inv
//     reaches an Invalid line (unspecified reception), the entry stays
//     locked and every later request is rejected (livelock).
// Each mechanism is counted and must occur at least once.
module tb_coh_system;
  import coh_pkg::*;

  localparam int unsigned N = 3, WORDS = 4, DATA_W = 32, LINES = 4, DEPTH = 8;
  localparam int unsigned ADDR_W = 6, SEL_W = 3;
  localparam int unsigned NOPS = 400;

  logic              clk = 1'b0, rst_n;
  logic [N-1:0]      req_valid, req_ready, req_we, resp_valid;
  logic [ADDR_W-1:0] req_addr   [N];
  logic [DATA_W-1:0] req_wdata  [N];
  logic [DATA_W-1:0] resp_rdata [N];
  logic [N-1:0]      sch_hold, rch_hold;
  logic [SEL_W-1:0]  sch_sel [N];
  logic [SEL_W-1:0]  rch_sel [N];
  logic [N-1:0]      cache_unspec;
  m2c_e              cache_unspec_cmd   [N];
  cstate_e           cache_unspec_state [N];
  logic              dir_unspec;
  c2m_e              dir_unspec_cmd;
  logic [1:0]        dir_unspec_src;

  coh_system dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(negedge clk) cycle++;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // ------------------------------------------------------------ monitors
  logic [SEL_W:0] sch_cnt [N];
  logic [SEL_W:0] rch_cnt [N];
  for (genvar g = 0; g < N; g++) begin : g_cnt
    assign sch_cnt[g] = dut.g_base[g].sch_count;
    assign rch_cnt[g] = dut.g_base[g].rch_count;
  end

  int n_c2m [7];     // messages sent by caches, by command
  int n_m2c [5];     // messages sent by the memory, by command (per receiver)
  int n_tx  [N];     // messages sent per cache
  m2c_e    last_ucmd [N];  // last unspecified reception per cache:
  cstate_e last_ust  [N];  // command dropped and state of the line
  int n_unspec = 0, n_dir_unspec = 0, n_hold_cycles = 0;
  int n_read_hit = 0, n_write_hit = 0, n_retry = 0;
  int n_reorder = 0, n_stale = 0, n_livelock = 0, n_multi_inv = 0;
  int max_occ = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (dut.c_tx_valid[i] && dut.c_tx_ready[i]) begin
        n_c2m[int'(dut.c_tx_cmd[i])]++;
        n_tx[i]++;
      end
      if (dut.m_out_valid[i]) n_m2c[int'(dut.m_out_cmd)]++;
      if (cache_unspec[i]) begin
        n_unspec++;
        last_ucmd[i] = cache_unspec_cmd[i];
        last_ust[i]  = cache_unspec_state[i];
      end
      if ((sch_hold[i] && sch_cnt[i] != 0) ||
          (rch_hold[i] && rch_cnt[i] != 0)) n_hold_cycles++;
    end
    if (dut.m_out_cmd == M2C_INV && $countones(dut.m_out_valid) > 1) n_multi_inv++;
    if (dir_unspec) n_dir_unspec++;
    for (int i = 0; i < N; i++) begin
      if (int'(sch_cnt[i]) > max_occ) max_occ = int'(sch_cnt[i]);
      if (int'(rch_cnt[i]) > max_occ) max_occ = int'(rch_cnt[i]);
    end
  end

  // ------------------------------------------------------------ processors
  logic [DATA_W-1:0] ref_mem [64];
  bit                got [N];
  logic [DATA_W-1:0] rdata [N];
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N; i++) if (resp_valid[i]) begin
      got[i]   = 1'b1;
      rdata[i] = resp_rdata[i];
    end

  task automatic issue(input int p, input bit we, input int addr, input logic [DATA_W-1:0] wd);
    while (!req_ready[p]) @(posedge clk);
    #1;
    got[p] = 1'b0;
    req_valid[p] = 1'b1; req_we[p] = we; req_addr[p] = ADDR_W'(addr); req_wdata[p] = wd;
    @(posedge clk);
    #1 req_valid[p] = 1'b0;
  endtask

  task automatic wait_done(input int p, input int limit, output bit ok);
    int t = 0;
    while (!got[p] && t < limit) begin @(posedge clk); t++; end
    #1 ok = got[p];
  endtask

  // one complete access; hits are the accesses that send no message
  task automatic access(input int p, input bit we, input int addr, input logic [DATA_W-1:0] wd,
                        output logic [DATA_W-1:0] rd);
    int tx0 = n_tx[p];
    bit ok;
    issue(p, we, addr, wd);
    wait_done(p, 400, ok);
    check(ok, $sformatf("P%0d %s %0d completes", p, we ? "store" : "load", addr));
    rd = rdata[p];
    if (ok && n_tx[p] == tx0) begin
      if (we) n_write_hit++;
      else    n_read_hit++;
    end
  endtask

  function automatic bit channels_empty();
    for (int i = 0; i < N; i++)
      if (sch_cnt[i] != 0 || rch_cnt[i] != 0) return 1'b0;
    return 1'b1;
  endfunction

  task automatic drain();
    int t = 0;
    while (!channels_empty() && t < 200) begin @(posedge clk); t++; end
    repeat (2) @(posedge clk);
    #1 check(channels_empty(), "channels drain");
  endtask

  // let exactly one message leave sending channel p (start searching at s)
  task automatic release_one(input int p, input int s);
    #1 sch_sel[p] = SEL_W'(s); sch_hold[p] = 1'b0;
    @(posedge clk);
    #1 sch_hold[p] = 1'b1;
  endtask

  function automatic int A(input int blk, input int off);
    return blk * WORDS + off;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] rd, v_old, v_new;
    int rejects0;
    bit ok;
    rst_n = 1'b0; req_valid = '0; req_we = '0; sch_hold = '0; rch_hold = '0;
    for (int i = 0; i < N; i++) begin
      req_addr[i] = '0; req_wdata[i] = '0; sch_sel[i] = '0; rch_sel[i] = '0; got[i] = 1'b0;
    end
    for (int a = 0; a < 64; a++) ref_mem[a] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------------------------------------------------- miss latency
    // uncontended read miss: accepted on edge t, resp_valid seen at edge t+5
    begin
      int t0;
      issue(0, 1'b0, A(12, 1), '0);
      t0 = cycle;
      while (!got[0] && cycle < t0 + 50) @(posedge clk);
      check(cycle == t0 + 5, $sformatf("read miss latency %0d edges, expected 5", cycle - t0));
      check(rdata[0] == '0, "cold read returns reset memory");
      drain();
    end

    // ---------------------------------------------------- phase 1
    for (int k = 0; k < NOPS; k++) begin
      int p, addr;
      bit we;
      logic [DATA_W-1:0] wd;
      p    = $urandom_range(0, N - 1);
      we   = ($urandom_range(0, 99) < 40);
      addr = A($urandom_range(0, 7), $urandom_range(0, WORDS - 1));
      wd   = $urandom;
      access(p, we, addr, wd, rd);
      if (we) ref_mem[addr] = wd;
      else check(rd == ref_mem[addr],
                 $sformatf("P%0d load %0d: got %h, expected %h", p, addr, rd, ref_mem[addr]));
      drain();
    end
    $display("phase 1: %0d serialised accesses checked", NOPS);

    // ---------------------------------------------------- phase 2a: Reject
    // block 9: P0 owns it
    access(0, 1'b1, A(9, 1), 32'hCAFE_0009, rd);
    ref_mem[A(9, 1)] = 32'hCAFE_0009;
    drain();
    rch_hold[0] = 1'b1;                    // UpdM to the owner stays in transit
    issue(1, 1'b0, A(9, 1), '0);           // XData, entry locked
    repeat (6) @(posedge clk);
    rejects0 = n_m2c[int'(M2C_REJECT)];
    issue(2, 1'b0, A(9, 1), '0);           // rejected and retried
    repeat (40) @(posedge clk);
    check(n_m2c[int'(M2C_REJECT)] > rejects0, "request to a locked entry rejected");
    check(!got[1] && !got[2], "both readers wait while the entry is locked");
    #1 rch_hold[0] = 1'b0;
    wait_done(1, 200, ok);
    check(ok && rdata[1] == 32'hCAFE_0009, "XData reader gets the owner's data");
    wait_done(2, 400, ok);
    check(ok && rdata[2] == 32'hCAFE_0009, "retried reader gets the owner's data");
    drain();

    // ---------------------------------------------------- phase 2b: Repl overtaken
    // block 10 and block 14 share a line. P0 reads block 10 (Shared).
    access(2, 1'b1, A(10, 0), 32'h0000_AAAA, rd);
    ref_mem[A(10, 0)] = 32'h0000_AAAA;
    drain();
    access(0, 1'b0, A(10, 0), '0, v_old);
    check(v_old == 32'h0000_AAAA, "P0 reads block 10");
    drain();
    #1 sch_hold[0] = 1'b1;
    issue(0, 1'b0, A(14, 0), '0);          // Repl 10 (slot 0), ReqSC 14 (slot 1)
    repeat (4) @(posedge clk);
    release_one(0, 1);                     // ReqSC 14 overtakes Repl 10
    n_reorder++;
    wait_done(0, 100, ok);
    check(ok && rdata[0] == ref_mem[A(14, 0)], "P0 reads block 14");
    issue(0, 1'b0, A(10, 0), '0);          // Repl 14 (slot 1), ReqSC 10 (slot 2)
    repeat (4) @(posedge clk);
    release_one(0, 1);                     // Repl 14
    release_one(0, 1);                     // ReqSC 10, still ahead of Repl 10
    n_reorder++;
    wait_done(0, 100, ok);
    check(ok && rdata[0] == 32'h0000_AAAA, "P0 has block 10 Shared again");
    #1 sch_hold[0] = 1'b0;                 // the late Repl 10 clears P0's bit
    drain();
    access(1, 1'b1, A(10, 0), 32'h0000_BBBB, rd);   // no Inv reaches P0
    ref_mem[A(10, 0)] = 32'h0000_BBBB;
    drain();
    access(0, 1'b0, A(10, 0), '0, v_new);
    check(v_new == 32'h0000_AAAA, "the overtaken Repl leaves P0 with a stale copy");
    if (v_new != ref_mem[A(10, 0)]) n_stale++;
    access(2, 1'b0, A(10, 0), '0, rd);
    check(rd == 32'h0000_BBBB, "other caches see the new value");
    drain();

    // ---------------------------------------------------- phase 2c: livelock
    // block 3 (line 3) shared by all three caches; block 7 shares its line
    for (int p = 0; p < N; p++) begin
      access(p, 1'b0, A(3, 2), '0, rd);
      check(rd == ref_mem[A(3, 2)], "sharers read block 3");
      drain();
    end
    #1 sch_hold[0] = 1'b1;
    issue(0, 1'b0, A(7, 0), '0);           // Repl 3 (slot 0), ReqSC 7 (slot 1)
    repeat (4) @(posedge clk);
    release_one(0, 1);
    wait_done(0, 100, ok);
    check(ok, "P0 now holds block 7 in the line of block 3");
    begin
      int u0;
      u0 = n_unspec;
      issue(2, 1'b1, A(3, 2), 32'h0000_3333);   // ReqO: Inv to P0 and P1
      repeat (30) @(posedge clk);
      check(n_unspec > u0, "Inv reaching an Invalid line is an unspecified reception");
      check(last_ucmd[0] == M2C_INV && last_ust[0] == CS_I, "P0 reports a dropped Inv in state I");
    end
    #1 sch_hold[0] = 1'b0;                 // Repl 3 arrives after P1's IAck
    repeat (20) @(posedge clk);
    rejects0 = n_m2c[int'(M2C_REJECT)];
    issue(1, 1'b0, A(3, 2), '0);
    repeat (300) @(posedge clk);
    #1;
    check(!got[2], "the pending store never completes");
    check(!got[1], "a new reader never gets the block");
    check(n_m2c[int'(M2C_REJECT)] - rejects0 > 10, "requests are rejected over and over");
    if (!got[2] && !got[1] && n_m2c[int'(M2C_REJECT)] - rejects0 > 10) n_livelock++;

    // ---------------------------------------------------- mechanism coverage
    begin
      string names [$];
      int    counts[$];
      names = '{"read hit", "write hit on Owner", "ReqSC", "ReqO", "ReqOC", "DxM", "DOxM",
                "Repl", "IAck", "Inv", "UpdM", "Ownership", "Data", "Reject",
                "Inv to several caches", "channel hold", "reordered delivery",
                "unspecified reception", "stale copy", "livelock"};
      counts = '{n_read_hit, n_write_hit, n_c2m[0], n_c2m[1], n_c2m[2], n_c2m[3], n_c2m[4],
                 n_c2m[5], n_c2m[6], n_m2c[0], n_m2c[1], n_m2c[2], n_m2c[3], n_m2c[4],
                 n_multi_inv, n_hold_cycles, n_reorder, n_unspec, n_stale, n_livelock};
      for (int k = 0; k < names.size(); k++) begin
        $display("  %-24s %0d", names[k], counts[k]);
        check(counts[k] > 0, {"mechanism happened: ", names[k]});
      end
    end
    $display("  highest channel occupancy %0d of %0d", max_occ, DEPTH);
    check(max_occ < DEPTH, "no channel ever filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
