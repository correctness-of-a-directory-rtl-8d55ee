// tb_coh_cache: self-checking test of one cache controller.
//
// The testbench plays both the processor and the memory side. It issues
// loads and stores, watches the messages the cache sends, answers them with
// hand-written memory-to-cache messages and checks every response, every
// outgoing message (command, block and data) and the cycle counts of the
// hit and miss paths. Covered: read/write hit, read miss, write miss, write
// hit on Shared (ReqO), Reject and retry from RMP, WMP and WHP, Inv on S and
// O, UpdM, eviction of a Shared (Repl) and of an Owner (DOxM) line,
// unspecified receptions, and stalling while the sending channel is full.
module tb_coh_cache;
  import coh_pkg::*;

  localparam int unsigned MEM_BLOCKS = 16, WORDS = 4, DATA_W = 32, LINES = 4;
  localparam int unsigned BLK_W = 4, ADDR_W = 6, LINE_W = WORDS * DATA_W;

  logic              clk = 1'b0, rst_n;
  logic              req_valid, req_ready, req_we, resp_valid;
  logic [ADDR_W-1:0] req_addr;
  logic [DATA_W-1:0] req_wdata, resp_rdata;
  logic              rx_valid, rx_ready, tx_valid, tx_ready, unspec_rx;
  m2c_e              rx_cmd, unspec_cmd;
  c2m_e              tx_cmd;
  cstate_e           unspec_state;
  logic [BLK_W-1:0]  rx_blk, tx_blk;
  logic [LINE_W-1:0] rx_data, tx_data;

  coh_cache #(.MEM_BLOCKS(MEM_BLOCKS), .WORDS(WORDS), .DATA_W(DATA_W),
              .CACHE_LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(negedge clk) cycle++;   // stable while posedge processes run

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Everything the cache sends, with the cycle it was sent in.
  typedef struct { c2m_e cmd; logic [BLK_W-1:0] blk; logic [LINE_W-1:0] data; int at; } txm_t;
  txm_t txq[$];
  always @(posedge clk)
    if (rst_n && tx_valid && tx_ready) txq.push_back('{tx_cmd, tx_blk, tx_data, cycle});

  int resp_at, unspec_seen = 0;
  logic [DATA_W-1:0] last_rdata;
  bit got_resp;
  always @(posedge clk) begin
    if (rst_n && resp_valid) begin
      got_resp   = 1'b1;
      resp_at    = cycle;
      last_rdata = resp_rdata;
    end
    if (rst_n && unspec_rx) unspec_seen++;
  end

  // Distinct recognisable line contents per block.
  function automatic logic [LINE_W-1:0] line_of(input int blk);
    for (int k = 0; k < WORDS; k++) line_of[k*DATA_W +: DATA_W] = 32'hB000_0000 + blk * 16 + k;
  endfunction

  function automatic logic [ADDR_W-1:0] A(input int blk, input int off);
    return ADDR_W'(blk * WORDS + off);
  endfunction

  int issued_at;
  task automatic issue(input bit we, input logic [ADDR_W-1:0] addr, input logic [DATA_W-1:0] wd);
    while (!req_ready) @(posedge clk);
    #1;
    got_resp = 1'b0;
    req_valid = 1'b1; req_we = we; req_addr = addr; req_wdata = wd;
    @(posedge clk);
    issued_at = cycle;
    #1 req_valid = 1'b0;
  endtask

  task automatic wait_resp(input string what);
    int t = 0;
    while (!got_resp && t < 50) begin @(posedge clk); t++; end
    #1;
    check(got_resp, {what, ": response"});
  endtask

  task automatic expect_tx(input c2m_e cmd, input int blk, input string what);
    int t = 0;
    while (txq.size() == 0 && t < 50) begin @(posedge clk); t++; end
    #1;
    if (txq.size() == 0) begin
      check(1'b0, {what, ": no message sent"});
    end else begin
      txm_t m = txq.pop_front();
      check(m.cmd == cmd && int'(m.blk) == blk,
            $sformatf("%s: expected %s blk %0d, got %s blk %0d", what, cmd.name(), blk,
                      m.cmd.name(), m.blk));
    end
  endtask

  task automatic send_rx(input m2c_e cmd, input int blk, input logic [LINE_W-1:0] d);
    #1;
    rx_valid = 1'b1; rx_cmd = cmd; rx_blk = BLK_W'(blk); rx_data = d;
    do @(posedge clk); while (!rx_ready);
    #1 rx_valid = 1'b0;
  endtask

  task automatic expect_quiet(input int n, input string what);
    repeat (n) @(posedge clk);
    #1;
    check(txq.size() == 0, {what, ": no message sent"});
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LINE_W-1:0] l;
    txm_t m;
    rst_n = 1'b0; req_valid = 1'b0; req_we = 1'b0; req_addr = '0; req_wdata = '0;
    rx_valid = 1'b0; rx_cmd = M2C_INV; rx_blk = '0; rx_data = '0; tx_ready = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. read miss on block 1 -> ReqSC one cycle after acceptance
    issue(1'b0, A(1, 2), '0);
    @(posedge clk); #1;
    check(txq.size() == 1 && txq[0].at == issued_at + 1, "read miss sends ReqSC on the next edge");
    expect_tx(C2M_REQSC, 1, "read miss");
    // Reject in RMP -> ReqSC again
    send_rx(M2C_REJECT, 1, '0);
    expect_tx(C2M_REQSC, 1, "Reject in RMP re-sends ReqSC");
    send_rx(M2C_DATA, 1, line_of(1));
    wait_resp("read miss data");
    check(last_rdata == line_of(1)[2*DATA_W +: DATA_W], "read miss returns word 2 of the block");

    // 2. read hit: answered one cycle after acceptance, no message
    issue(1'b0, A(1, 3), '0);
    wait_resp("read hit");
    check(resp_at == issued_at + 2, "read hit: resp_valid high in the cycle after the deciding edge");
    check(last_rdata == line_of(1)[3*DATA_W +: DATA_W], "read hit data");
    expect_quiet(3, "read hit");

    // 3. write hit on Shared -> ReqO (WHP); Reject -> ReqO again; Ownership
    issue(1'b1, A(1, 0), 32'h1111_0000);
    expect_tx(C2M_REQO, 1, "write hit on S");
    repeat (3) @(posedge clk);
    check(!got_resp, "store waits for ownership");
    send_rx(M2C_REJECT, 1, '0);
    expect_tx(C2M_REQO, 1, "Reject in WHP re-sends ReqO");
    send_rx(M2C_OWNERSHIP, 1, '0);
    wait_resp("ownership completes store");

    // 4. write hit on Owner: local, one cycle
    issue(1'b1, A(1, 1), 32'h2222_0001);
    wait_resp("write hit on O");
    check(resp_at == issued_at + 2, "write hit on O: same latency as a read hit");
    expect_quiet(2, "write hit on O");

    // 5. UpdM on Owner -> DxM carrying the modified block, line becomes S
    l = line_of(1);
    l[0 +: DATA_W] = 32'h1111_0000;
    l[DATA_W +: DATA_W] = 32'h2222_0001;
    send_rx(M2C_UPDM, 1, '0);
    @(posedge clk); #1;
    m = txq.size() ? txq[0] : m;
    check(txq.size() == 1 && m.cmd == C2M_DXM && m.blk == 1 && m.data == l, "UpdM answered by DxM with data");
    void'(txq.pop_front());
    // now Shared: a store must ask for ownership again
    issue(1'b1, A(1, 3), 32'h3333_0003);
    expect_tx(C2M_REQO, 1, "after DxM the line is Shared");
    send_rx(M2C_OWNERSHIP, 1, '0);
    wait_resp("second ownership");
    l[3*DATA_W +: DATA_W] = 32'h3333_0003;

    // 6. Inv on Owner -> DOxM with data, line invalid
    send_rx(M2C_INV, 1, '0);
    @(posedge clk); #1;
    m = txq.size() ? txq[0] : m;
    check(txq.size() == 1 && m.cmd == C2M_DOXM && m.blk == 1 && m.data == l, "Inv on O answered by DOxM with data");
    void'(txq.pop_front());

    // 7. write miss on block 2 -> ReqOC; Reject in WMP -> ReqOC; Data
    issue(1'b1, A(2, 1), 32'h4444_0001);
    expect_tx(C2M_REQOC, 2, "write miss");
    send_rx(M2C_REJECT, 2, '0);
    expect_tx(C2M_REQOC, 2, "Reject in WMP re-sends ReqOC");
    send_rx(M2C_DATA, 2, line_of(2));
    wait_resp("write miss data");
    issue(1'b0, A(2, 1), '0);
    wait_resp("read back written word");
    check(last_rdata == 32'h4444_0001, "write miss merged the store");
    issue(1'b0, A(2, 0), '0);
    wait_resp("read back other word");
    check(last_rdata == line_of(2)[0 +: DATA_W], "write miss kept the fetched words");
    expect_quiet(2, "hits on Owner");

    // 8. block 1 was invalidated: reading it misses again
    issue(1'b0, A(1, 0), '0);
    expect_tx(C2M_REQSC, 1, "miss after invalidation");
    send_rx(M2C_DATA, 1, line_of(1));
    wait_resp("refill");

    // 9. Inv on Shared -> IAck
    send_rx(M2C_INV, 1, '0);
    expect_tx(C2M_IACK, 1, "Inv on S acknowledged");

    // 10. replacement: block 5 maps to the line of block 1
    issue(1'b0, A(1, 0), '0);
    expect_tx(C2M_REQSC, 1, "refill block 1");
    send_rx(M2C_DATA, 1, line_of(1));
    wait_resp("block 1 Shared");
    issue(1'b0, A(5, 2), '0);
    expect_tx(C2M_REPL, 1, "Shared victim replaced with Repl");
    expect_tx(C2M_REQSC, 5, "then the miss request");
    send_rx(M2C_DATA, 5, line_of(5));
    wait_resp("block 5");
    check(last_rdata == line_of(5)[2*DATA_W +: DATA_W], "block 5 data");
    // block 6 maps to the Owner line of block 2
    issue(1'b0, A(6, 0), '0);
    @(posedge clk); @(posedge clk); #1;
    m = txq.size() ? txq[0] : m;
    l = line_of(2);
    l[DATA_W +: DATA_W] = 32'h4444_0001;
    check(txq.size() >= 1 && m.cmd == C2M_DOXM && m.blk == 2 && m.data == l, "Owner victim written back with DOxM");
    void'(txq.pop_front());
    expect_tx(C2M_REQSC, 6, "miss after owner eviction");

    // 11. unspecified receptions: UpdM and Inv in RMP are dropped and flagged
    begin
      int n0;
      n0 = unspec_seen;
      send_rx(M2C_UPDM, 6, '0);
      send_rx(M2C_INV, 6, '0);
      send_rx(M2C_INV, 9, '0);            // block not cached (Invalid)
      send_rx(M2C_OWNERSHIP, 6, '0);      // Ownership in RMP
      @(posedge clk); @(posedge clk); #1;
      check(unspec_seen == n0 + 4, "four unspecified receptions flagged");
      check(txq.size() == 0, "unspecified receptions send nothing");
      check(!got_resp, "unspecified receptions complete nothing");
    end
    send_rx(M2C_DATA, 6, line_of(6));
    wait_resp("block 6 after unspecified messages");
    check(last_rdata == line_of(6)[0 +: DATA_W], "block 6 data");

    // 12. sending channel full: nothing is consumed or sent
    tx_ready = 1'b0;
    issue(1'b0, A(3, 0), '0);
    #1 rx_valid = 1'b1; rx_cmd = M2C_INV; rx_blk = 4'd6; rx_data = '0;
    repeat (4) begin
      #1 check(!rx_ready, "no message consumed while the sending channel is full");
      @(posedge clk);
    end
    #1 check(txq.size() == 0 && !got_resp, "stalled while the sending channel is full");
    tx_ready = 1'b1;
    @(posedge clk); #1 rx_valid = 1'b0;
    expect_tx(C2M_IACK, 6, "Inv handled first after the stall");
    expect_tx(C2M_REQSC, 3, "then the pending miss");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
