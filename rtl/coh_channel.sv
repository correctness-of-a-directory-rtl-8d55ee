// coh_channel: unordered message channel between one cache and the memory.
//
// Each processor has two of these: a sending channel (CH-, cache to memory)
// and a receiving channel (CH+, memory to cache). The protocol puts no
// restriction on delivery order: a message may be consumed before one that
// was sent earlier. The channel therefore is not a FIFO but a pool of DEPTH
// slots. A message sent in is written into the lowest free slot. The message
// offered for delivery is the first occupied slot found when searching
// upward, with wrap-around, from slot `sel`. Whoever drives `sel` thus
// chooses the delivery order: a constant gives a fixed slot priority, a
// counter or random source gives arbitrary reordering. `hold` keeps every
// message in transit for as long as it is high, which models a slow
// network.
//
// Interface: valid/ready on both sides. A message is taken in on a clock
// edge with in_valid && in_ready and handed out on a clock edge with
// out_valid && out_ready. in_ready is low only when all slots are full;
// a message taken in is offered from the next cycle on. Sending and
// delivering in the same cycle is allowed.
//
// The slot pool, the `sel`/`hold` controls, DEPTH and the handshake are this
// design's choices; the protocol only requires an unordered medium.
module coh_channel #(
  parameter int unsigned W     = 3 + $clog2(coh_pkg::DEF_MEM_BLOCKS)
                                   + coh_pkg::DEF_WORDS * coh_pkg::DEF_DATA_W,
  parameter int unsigned DEPTH = coh_pkg::DEF_CH_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_msg,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_msg,
  input  logic                       hold,
  input  logic [$clog2(DEPTH)-1:0]   sel,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int unsigned SW = $clog2(DEPTH);

  logic [DEPTH-1:0] occ;
  logic [W-1:0]     slot [DEPTH];

  logic          have_free, have_msg;
  logic [SW-1:0] free_idx, out_idx;

  // Lowest free slot.
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!occ[i]) begin
        have_free = 1'b1;
        free_idx  = SW'(i);
      end
    end
  end

  // First occupied slot at or after sel, wrapping around.
  always_comb begin
    have_msg = 1'b0;
    out_idx  = '0;
    for (int k = DEPTH - 1; k >= 0; k--) begin
      logic [SW-1:0] idx;
      idx = sel + SW'(k);
      if (occ[idx]) begin
        have_msg = 1'b1;
        out_idx  = idx;
      end
    end
  end

  assign in_ready  = have_free;
  assign out_valid = have_msg && !hold;
  assign out_msg   = slot[out_idx];

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count += (SW+1)'(occ[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      occ <= '0;
    end else begin
      if (out_valid && out_ready) occ[out_idx] <= 1'b0;
      if (in_valid && in_ready) begin
        occ[free_idx]  <= 1'b1;
        slot[free_idx] <= in_msg;
      end
    end
  end

  // A power-of-two depth keeps the wrap-around search a plain addition.
  initial assert (DEPTH >= 2 && (1 << SW) == DEPTH)
    else $error("coh_channel: DEPTH must be a power of two >= 2");

  // The slot being delivered is never the one being filled.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_ready && out_valid && out_ready) |-> free_idx != out_idx);

endmodule
