// tb_coh_races: ownership and write-back races of a write-invalidate
// directory protocol without extra acknowledgements, run on the full system
// at its default size. Delivery is steered with the channels' hold controls.
//
//  a) Two sharers ask for ownership at the same time. The memory takes P1's
//     ReqO first and invalidates P0, which is itself waiting in
//     write-hit-pending. For that line state the protocol defines no
//     reaction to Inv: the cache drops it and flags an unspecified
//     reception, so no IAck ever comes, the entry stays locked, P0's own
//     ReqO is rejected again and again, and neither store completes.
//  b) An Owner evicts its block (DOxM) while an Inv for the same block,
//     caused by another cache's write miss (ReqOC), is still in transit.
//     The memory takes the DOxM as the answer to its Inv and hands the data
//     with ownership to the writer, which therefore sees the evicted
//     owner's last store. The late Inv then reaches a line that no longer
//     holds the block and is flagged as an unspecified reception.
//  c) An owner's data and an UpdM for the same block pass each other. P0's
//     write miss is granted (Data held in transit), P1's read then finds the
//     block dirty and sends UpdM to P0, and P2's read is rejected. The UpdM
//     overtakes the Data and reaches P0 in write-miss-pending, where it is
//     an unspecified reception and is dropped; the entry stays in XData.
//     Only P0's later eviction of the block (DOxM) releases it, and P1 then
//     receives P0's store, after which P2's retry succeeds.
//  d) As c), but the Data overtakes the UpdM: P0 becomes the owner, evicts the
//     block (DOxM, which completes the XData entry and serves P1), and the
//     UpdM arrives afterwards at a cache that no longer holds the block,
//     another unspecified reception, harmless here.
// The test checks these outcomes of the specified protocol.
module tb_coh_races;
  import coh_pkg::*;

  localparam int unsigned N = 3, WORDS = 4, DATA_W = 32, LINES = 4, DEPTH = 8;
  localparam int unsigned ADDR_W = 6, SEL_W = 3;

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
  int n_read_hit = 0, n_write_hit = 0, n_multi_inv = 0;

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
  end

  // ------------------------------------------------------------ processors
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

  // let exactly one message leave receiving channel p (start searching at s)
  task automatic release_one_rch(input int p, input int s);
    #1 rch_sel[p] = SEL_W'(s); rch_hold[p] = 1'b0;
    @(posedge clk);
    #1 rch_hold[p] = 1'b1;
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
    logic [DATA_W-1:0] rd;
    int rejects0, u0;
    bit ok;
    rst_n = 1'b0; req_valid = '0; req_we = '0; sch_hold = '0; rch_hold = '0;
    for (int i = 0; i < N; i++) begin
      req_addr[i] = '0; req_wdata[i] = '0; sch_sel[i] = '0; rch_sel[i] = '0; got[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ------------------------------------------------ b) DOxM racing an Inv
    access(0, 1'b1, A(2, 3), 32'h0000_0D0D, rd);   // P0 owns block 2
    drain();
    #1 rch_hold[0] = 1'b1;                         // Inv to P0 stays in transit
    issue(1, 1'b1, A(2, 0), 32'h0000_1111);        // ReqOC: Inv to P0, XOwnC
    repeat (10) @(posedge clk);
    check(!got[1], "writer waits for the owner");
    u0 = n_unspec;
    issue(0, 1'b0, A(6, 0), '0);                   // block 6 evicts block 2: DOxM
    wait_done(1, 100, ok);
    check(ok, "the eviction's DOxM completes the pending ReqOC");
    #1 rch_hold[0] = 1'b0;                         // Inv and Data for P0 delivered
    wait_done(0, 100, ok);
    check(ok, "P0's read of block 6 completes");
    repeat (10) @(posedge clk);
    check(n_unspec == u0 + 1, "the late Inv is an unspecified reception");
    check(last_ucmd[0] == M2C_INV, "P0 reports the dropped Inv");
    drain();
    access(1, 1'b0, A(2, 3), '0, rd);
    check(rd == 32'h0000_0D0D, "the new owner holds the evicted owner's store");
    access(1, 1'b0, A(2, 0), '0, rd);
    check(rd == 32'h0000_1111, "and its own store");
    access(2, 1'b0, A(2, 0), '0, rd);
    check(rd == 32'h0000_1111, "a third cache reads the new owner's data");
    drain();

    // ------------------------------------------------ a) two concurrent ReqO
    access(0, 1'b0, A(5, 0), '0, rd);              // P0 and P1 share block 5
    access(1, 1'b0, A(5, 0), '0, rd);
    drain();
    #1 sch_hold[0] = 1'b1;                         // P0's ReqO arrives late
    issue(0, 1'b1, A(5, 0), 32'h0000_AAAA);        // P0: WHP
    issue(1, 1'b1, A(5, 1), 32'h0000_BBBB);        // P1: WHP, its ReqO wins
    u0 = n_unspec;
    repeat (20) @(posedge clk);
    check(n_unspec == u0 + 1, "Inv reaching a write-hit-pending line is unspecified");
    check(last_ucmd[0] == M2C_INV && last_ust[0] == CS_WHP, "P0 reports Inv dropped in WHP");
    rejects0 = n_m2c[int'(M2C_REJECT)];
    #1 sch_hold[0] = 1'b0;
    repeat (300) @(posedge clk);
    #1;
    check(!got[0] && !got[1], "neither store completes");
    check(n_m2c[int'(M2C_REJECT)] - rejects0 > 10, "P0's ReqO is rejected over and over");

    // ------------------------------------------------ c) UpdM overtakes Data
    // the caches still hang on block 5 from a): start again from reset
    #1 rst_n = 1'b0; sch_hold = '0; rch_hold = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < N; i++) got[i] = 1'b0;
    #1 rch_hold[0] = 1'b1;
    issue(0, 1'b1, A(8, 2), 32'h0000_8888);        // ReqOC granted: Data held (slot 0)
    repeat (6) @(posedge clk);
    issue(1, 1'b0, A(8, 2), '0);                   // dirty: XData, UpdM to P0 (slot 1)
    repeat (6) @(posedge clk);
    rejects0 = n_m2c[int'(M2C_REJECT)];
    issue(2, 1'b0, A(8, 2), '0);                   // locked: rejected and retried
    repeat (20) @(posedge clk);
    check(n_m2c[int'(M2C_REJECT)] > rejects0, "third reader rejected during XData");
    u0 = n_unspec;
    release_one_rch(0, 1);                         // UpdM reaches P0 in WMP
    repeat (2) @(posedge clk);
    check(n_unspec == u0 + 1, "UpdM in write-miss-pending is an unspecified reception");
    check(last_ucmd[0] == M2C_UPDM && last_ust[0] == CS_WMP, "P0 reports UpdM dropped in WMP");
    release_one_rch(0, 0);                         // now the Data
    wait_done(0, 50, ok);
    check(ok, "P0's store completes; P0 is the owner");
    #1 rch_hold[0] = 1'b0;
    repeat (100) @(posedge clk);
    #1 check(!got[1] && !got[2], "the dropped UpdM leaves both readers waiting");
    issue(0, 1'b0, A(12, 0), '0);                  // P0 evicts block 8: DOxM
    wait_done(1, 100, ok);
    check(ok && rdata[1] == 32'h0000_8888, "the eviction releases XData; P1 gets P0's store");
    wait_done(2, 200, ok);
    check(ok && rdata[2] == 32'h0000_8888, "P2's retry then succeeds");
    wait_done(0, 100, ok);
    check(ok, "P0's read of block 12 completes");

    // ------------------------------------------------ d) UpdM outlives the owner
    #1 rst_n = 1'b0; sch_hold = '0; rch_hold = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < N; i++) got[i] = 1'b0;
    #1 rch_hold[0] = 1'b1;
    issue(0, 1'b1, A(9, 1), 32'h0000_9999);        // ReqOC granted: Data held (slot 0)
    repeat (6) @(posedge clk);
    issue(1, 1'b0, A(9, 1), '0);                   // XData, UpdM to P0 (slot 1)
    repeat (6) @(posedge clk);
    release_one_rch(0, 0);                         // Data first: P0 owns block 9
    wait_done(0, 50, ok);
    check(ok, "P0's store completes with the UpdM still in transit");
    u0 = n_unspec;
    issue(0, 1'b0, A(13, 0), '0);                  // P0 evicts block 9: DOxM
    wait_done(1, 100, ok);
    check(ok && rdata[1] == 32'h0000_9999, "the eviction completes XData; P1 gets P0's store");
    release_one_rch(0, 0);                         // Data of block 13
    wait_done(0, 50, ok);
    check(ok, "P0's read of block 13 completes");
    release_one_rch(0, 1);                         // the UpdM finally arrives
    repeat (2) @(posedge clk);
    check(n_unspec == u0 + 1, "UpdM reaching a cache without the block is unspecified");
    check(last_ucmd[0] == M2C_UPDM && last_ust[0] == CS_I, "P0 reports UpdM dropped in state I");
    #1 rch_hold[0] = 1'b0;
    drain();
    access(2, 1'b0, A(9, 1), '0, rd);
    check(rd == 32'h0000_9999, "memory holds P0's store afterwards");
    $display("races: %0d Reject, %0d UpdM, %0d unspecified at caches, %0d at memory, %0d multi-Inv steps, %0d held cycles, %0d hits",
             n_m2c[int'(M2C_REJECT)], n_m2c[int'(M2C_UPDM)], n_unspec, n_dir_unspec, n_multi_inv,
             n_hold_cycles, n_read_hit + n_write_hit);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
