// tb_coh_directory: self-checking test of the memory and full-map directory.
//
// The testbench plays three caches and their channels. It presents
// cache-to-memory messages one at a time and checks, for each, which caches
// receive a message, its command, block and data, with the expected values
// written out by hand from the protocol. Covered: clean ReqSC, ReqO with and
// without sharers (Inv fan-out, XOwn, IAck completion), ReqOC (XOwnC,
// completion by IAck and by the owner's DOxM), ReqSC on a dirty block (UpdM,
// XData, completion by DxM and by DOxM), Reject on a locked entry, Repl and
// DOxM on free entries, unspecified DxM/IAck, the Repl-in-locked-entry
// livelock and the Repl/ReqSC race that leaves a stale copy, back-pressure
// from a full receiving channel, round-robin arbitration, and the
// one-message-per-cycle rate.
module tb_coh_directory;
  import coh_pkg::*;

  localparam int unsigned N = 3, MEM_BLOCKS = 16, WORDS = 4, DATA_W = 32;
  localparam int unsigned BLK_W = 4, LINE_W = WORDS * DATA_W;

  logic              clk = 1'b0, rst_n;
  logic              in_valid [N];
  logic              in_ready [N];
  c2m_e              in_cmd   [N];
  logic [BLK_W-1:0]  in_blk   [N];
  logic [LINE_W-1:0] in_data  [N];
  logic [N-1:0]      out_valid, out_space;
  m2c_e              out_cmd;
  logic [BLK_W-1:0]  out_blk;
  logic [LINE_W-1:0] out_data;
  logic              unspec_rx;
  c2m_e              unspec_cmd;
  logic [1:0]        unspec_src;

  coh_directory #(.NCACHE(N), .MEM_BLOCKS(MEM_BLOCKS), .WORDS(WORDS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int unspec_seen = 0;
  always @(posedge clk) if (rst_n && unspec_rx) unspec_seen++;

  // what the directory sent in the step that consumed the last message
  logic [N-1:0]      r_to;
  m2c_e              r_cmd;
  logic [BLK_W-1:0]  r_blk;
  logic [LINE_W-1:0] r_data;

  task automatic send(input int i, input c2m_e cmd, input int blk, input logic [LINE_W-1:0] d);
    in_valid[i] = 1'b1; in_cmd[i] = cmd; in_blk[i] = BLK_W'(blk); in_data[i] = d;
    #1;
    while (!in_ready[i]) begin @(posedge clk); #1; end
    r_to = out_valid; r_cmd = out_cmd; r_blk = out_blk; r_data = out_data;
    @(posedge clk);
    #1 in_valid[i] = 1'b0;
  endtask

  // send and check the answer; to == 0 means no message expected
  task automatic xact(input int i, input c2m_e cmd, input int blk, input logic [LINE_W-1:0] d,
                      input logic [N-1:0] to, input m2c_e ecmd, input string what);
    send(i, cmd, blk, d);
    if (to == '0)
      check(r_to == '0, $sformatf("%s: expected no message, got %b %s", what, r_to, r_cmd.name()));
    else
      check(r_to == to && r_cmd == ecmd && int'(r_blk) == blk,
            $sformatf("%s: expected %b %s, got %b %s blk %0d", what, to, ecmd.name(),
                      r_to, r_cmd.name(), r_blk));
  endtask

  function automatic logic [LINE_W-1:0] pat(input int v);
    for (int k = 0; k < WORDS; k++) pat[k*DATA_W +: DATA_W] = 32'(v * 256 + k);
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; out_space = '1;
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1'b0; in_cmd[i] = C2M_REQSC; in_blk[i] = '0; in_data[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- block 3: sharing, upgrade, owner read, ownership with data
    xact(0, C2M_REQSC, 3, '0, 3'b001, M2C_DATA, "clean ReqSC from 0");
    check(r_data == '0, "memory starts at zero");
    xact(1, C2M_REQSC, 3, '0, 3'b010, M2C_DATA, "clean ReqSC from 1");
    xact(0, C2M_REQO, 3, '0, 3'b010, M2C_INV, "ReqO with a sharer invalidates it");
    xact(2, C2M_REQSC, 3, '0, 3'b100, M2C_REJECT, "ReqSC to locked entry rejected");
    xact(2, C2M_REQOC, 3, '0, 3'b100, M2C_REJECT, "ReqOC to locked entry rejected");
    xact(1, C2M_IACK, 3, '0, 3'b001, M2C_OWNERSHIP, "last IAck grants ownership");
    xact(2, C2M_REQSC, 3, '0, 3'b001, M2C_UPDM, "ReqSC on dirty block asks the owner");
    xact(1, C2M_REQO, 3, '0, 3'b010, M2C_REJECT, "ReqO rejected during XData");
    xact(0, C2M_DXM, 3, pat(7), 3'b100, M2C_DATA, "DxM completes XData");
    check(r_data == pat(7), "reader gets the written-back data");
    xact(1, C2M_REQSC, 3, '0, 3'b010, M2C_DATA, "block clean again: memory answers");
    check(r_data == pat(7), "memory was updated by DxM");
    // now presence = {0,1,2}; ReqOC from 1 invalidates 0 and 2 at once
    xact(1, C2M_REQOC, 3, '0, 3'b101, M2C_INV, "ReqOC invalidates both other sharers");
    xact(0, C2M_IACK, 3, '0, 3'b000, M2C_INV, "first IAck: still waiting");
    xact(2, C2M_IACK, 3, '0, 3'b010, M2C_DATA, "second IAck: data with ownership");
    check(r_data == pat(7), "XOwnC data from memory");
    // block 3 is owned by 1 (its presence bit was set on completion)
    xact(0, C2M_REQSC, 3, '0, 3'b010, M2C_UPDM, "owner recorded after XOwnC completion");
    xact(1, C2M_DOXM, 3, pat(8), 3'b001, M2C_DATA, "DOxM completes XData");
    check(r_data == pat(8), "DOxM data forwarded");

    // ---- block 5: ownership transfer through the owner's DOxM
    xact(0, C2M_REQOC, 5, '0, 3'b001, M2C_DATA, "ReqOC without sharers answered at once");
    xact(1, C2M_REQOC, 5, '0, 3'b001, M2C_INV, "ReqOC with an owner invalidates it");
    xact(0, C2M_DOXM, 5, pat(9), 3'b010, M2C_DATA, "owner DOxM completes XOwnC");
    check(r_data == pat(9), "new owner gets the old owner's data");
    xact(2, C2M_REQSC, 5, '0, 3'b010, M2C_UPDM, "new owner is cache 1");
    xact(1, C2M_DXM, 5, pat(10), 3'b100, M2C_DATA, "owner keeps a copy with DxM");

    // ---- free-entry write-back and replacement
    xact(2, C2M_DOXM, 7, pat(11), 3'b000, M2C_DATA, "DOxM on a free entry");
    xact(0, C2M_REQSC, 7, '0, 3'b001, M2C_DATA, "memory holds written-back data");
    check(r_data == pat(11), "write-back stored");
    xact(0, C2M_REPL, 7, '0, 3'b000, M2C_DATA, "Repl on a free entry");
    xact(1, C2M_REQO, 7, '0, 3'b010, M2C_OWNERSHIP, "after Repl no sharer is left");

    // ---- unspecified receptions at the memory
    begin
      int n0;
      n0 = unspec_seen;
      xact(0, C2M_IACK, 9, '0, 3'b000, M2C_DATA, "IAck on a free entry");
      xact(1, C2M_DXM, 9, pat(1), 3'b000, M2C_DATA, "DxM on a free entry");
      @(posedge clk); #1;
      check(unspec_seen == n0 + 2, "both flagged as unspecified");
    end

    // ---- race of a replacement with a new read (stale copy)
    xact(0, C2M_REQSC, 11, '0, 3'b001, M2C_DATA, "0 reads block 11");
    xact(0, C2M_REQSC, 11, '0, 3'b001, M2C_DATA, "0's new ReqSC overtakes its Repl");
    xact(0, C2M_REPL, 11, '0, 3'b000, M2C_DATA, "late Repl clears 0's presence bit");
    xact(1, C2M_REQOC, 11, '0, 3'b010, M2C_DATA, "write by 1 sends no Inv to 0");

    // ---- the last sharer leaving by Repl never completes the request
    xact(0, C2M_REQSC, 13, '0, 3'b001, M2C_DATA, "0 reads block 13");
    xact(1, C2M_REQSC, 13, '0, 3'b010, M2C_DATA, "1 reads block 13");
    xact(2, C2M_REQOC, 13, '0, 3'b011, M2C_INV, "2 writes: Inv to 0 and 1");
    xact(1, C2M_IACK, 13, '0, 3'b000, M2C_DATA, "IAck from 1");
    xact(0, C2M_REPL, 13, '0, 3'b000, M2C_DATA, "Repl from 0 completes nothing");
    xact(2, C2M_REQOC, 13, '0, 3'b100, M2C_REJECT, "entry stays locked");

    // ---- back-pressure: nothing is taken while a receiving channel is full
    out_space = 3'b101;
    in_valid[0] = 1'b1; in_cmd[0] = C2M_REQSC; in_blk[0] = 4'd2;
    repeat (3) begin #1 check(!in_ready[0] && out_valid == '0, "stalled on a full receiving channel"); @(posedge clk); end
    out_space = '1;
    #1 check(in_ready[0] && out_valid == 3'b001, "resumes when space returns");
    @(posedge clk); #1 in_valid[0] = 1'b0;

    // ---- arbitration: three requests at once take three cycles, round robin
    begin
      int order [3];
      int n = 0;
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 1'b1; in_cmd[i] = C2M_REQSC; in_blk[i] = 4'd4;
      end
      for (int cyc = 0; cyc < 3; cyc++) begin
        #1;
        for (int i = 0; i < N; i++)
          if (in_ready[i]) begin
            if (n < 3) order[n] = i;
            n++;
            check(out_valid == 3'(1 << i), "answer goes to the granted cache");
          end
        @(posedge clk);
        #1;
        for (int i = 0; i < n; i++) in_valid[order[i]] = 1'b0;
      end
      check(n == 3, "one message per cycle");
      check(order[0] != order[1] && order[1] != order[2] && order[0] != order[2],
            "every cache served once");
      check(order[1] == (order[0] + 1) % 3 && order[2] == (order[1] + 1) % 3, "round-robin order");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
