// tb_coh_channel: self-checking test of the unordered message channel.
//
// Sends uniquely numbered messages at random times while a random `sel`
// and `hold` control delivery and the receiver takes messages at random.
// A scoreboard checks that every message comes out exactly once and
// unchanged, that the occupancy count and in_ready match a reference
// count, that a message sent into an empty channel is offered on the next
// cycle, that `hold` keeps messages back, and that messages are in fact
// delivered out of sending order.
module tb_coh_channel;
  localparam int unsigned W     = 16;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned SW    = $clog2(DEPTH);
  localparam int unsigned NMSG  = 2000;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid, in_ready, out_valid, out_ready, hold;
  logic [W-1:0]  in_msg, out_msg;
  logic [SW-1:0] sel;
  logic [SW:0]   count;

  coh_channel #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit sent      [NMSG];
  bit delivered [NMSG];
  int n_sent = 0, n_deliv = 0, model_count = 0, reorders = 0, max_deliv = -1;
  int held_cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; out_ready = 1'b0; hold = 1'b0; sel = '0; in_msg = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Latency: a message sent into the empty channel is offered next cycle.
    check(!out_valid && count == 0, "empty after reset");
    in_valid = 1'b1; in_msg = 16'hA5A5;
    @(posedge clk); #1;
    in_valid = 1'b0;
    check(out_valid && out_msg == 16'hA5A5, "offered one cycle after sending");
    hold = 1'b1; #1;
    check(!out_valid, "hold masks delivery");
    hold = 1'b0; out_ready = 1'b1;
    @(posedge clk); #1;
    out_ready = 1'b0;
    check(count == 0 && !out_valid, "delivered and empty");

    // Fill completely: in_ready must drop at DEPTH messages.
    for (int k = 0; k < DEPTH; k++) begin
      check(in_ready, "room while not full");
      in_valid = 1'b1; in_msg = 16'(16'h100 + k);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    check(!in_ready && count == DEPTH, "full after DEPTH messages");
    // sel picks the slot: with sel = 5 the message in slot 5 is offered.
    sel = 3'd5; #1;
    check(out_valid && out_msg == 16'h105, "sel chooses the delivered slot");
    out_ready = 1'b1;
    repeat (DEPTH) @(posedge clk);
    #1 out_ready = 1'b0;
    check(count == 0, "drained");

    // Random traffic.
    fork
      begin : producer
        while (n_sent < NMSG) begin
          in_valid = ($urandom_range(0, 99) < 60);
          in_msg   = W'(n_sent);
          @(posedge clk);
          if (in_valid && in_ready) begin
            sent[n_sent] = 1'b1;
            n_sent++;
            model_count++;
          end
          #1;
        end
        in_valid = 1'b0;
      end
      begin : consumer
        while (n_deliv < NMSG) begin
          out_ready = ($urandom_range(0, 99) < 50);
          hold      = ($urandom_range(0, 99) < 10);
          sel       = SW'($urandom);
          #1;
          check(count == (SW+1)'(model_count), "count matches reference");
          check(in_ready == (model_count < DEPTH), "in_ready iff not full");
          if (hold && model_count > 0) begin
            check(!out_valid, "nothing delivered while held");
            held_cycles++;
          end
          @(posedge clk);
          if (out_valid && out_ready) begin
            int id;
            id = int'(out_msg);
            check(id < NMSG && sent[id] && !delivered[id], "delivered once, after being sent");
            if (id < NMSG) delivered[id] = 1'b1;
            if (id < max_deliv) reorders++;
            if (id > max_deliv) max_deliv = id;
            n_deliv++;
            model_count--;
          end
          #1;
        end
      end
    join
    check(reorders > 0, "messages were reordered");
    check(held_cycles > 0, "hold exercised");
    begin
      int missing = 0;
      for (int k = 0; k < NMSG; k++) if (!delivered[k]) missing++;
      check(missing == 0, "every message delivered");
    end
    $display("channel: %0d messages, %0d reordered, %0d held cycles", NMSG, reorders, held_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
