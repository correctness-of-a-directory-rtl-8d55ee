// coh_system: a shared-memory multiprocessor kept coherent by a full-map
// directory.
//
// NCACHE base machines surround one memory. A base machine is a cache
// controller (coh_cache) with its sending channel CH- (cache to memory) and
// its receiving channel CH+ (memory to cache), both coh_channel instances
// that may deliver their messages in any order. The memory (coh_directory)
// keeps, per block, the presence bits of all caches, a dirty bit and the
// lock state of the entry.
//
//   processor i <-> coh_cache i -> CH-[i] -> coh_directory -> CH+[j] -> coh_cache j
//
// The processors are outside this module: each one's request/response port
// is an element of the req_*/resp_* arrays. The delivery controls of the
// channels are ports as well, so that the surrounding system (or a
// testbench) decides how long messages stay in transit (sch_hold, rch_hold)
// and in which order each channel releases them (sch_sel, rch_sel, the slot
// where the search for the next message starts). Tie the holds low and the
// selects to any value, e.g. a free-running counter, for normal operation.
// cache_unspec and dir_unspec pulse when a cache or the memory receives a
// message for which the protocol defines no action; with the pulse,
// cache_unspec_cmd/_state give the dropped command and the line's state, and
// dir_unspec_cmd/_src the dropped command and the cache that sent it.
//
// Message layout in both channels: {cmd[2:0], block number, block data}.
// The structure follows the protocol's architecture; the port-level
// controls of the channels and the message layout are this design's own.
module coh_system
  import coh_pkg::*;
#(
  parameter int unsigned NCACHE      = coh_pkg::DEF_NCACHE,
  parameter int unsigned MEM_BLOCKS  = coh_pkg::DEF_MEM_BLOCKS,
  parameter int unsigned WORDS       = coh_pkg::DEF_WORDS,
  parameter int unsigned DATA_W      = coh_pkg::DEF_DATA_W,
  parameter int unsigned CACHE_LINES = coh_pkg::DEF_CACHE_LINES,
  parameter int unsigned CH_DEPTH    = coh_pkg::DEF_CH_DEPTH,
  localparam int unsigned BLK_W  = $clog2(MEM_BLOCKS),
  localparam int unsigned ADDR_W = BLK_W + $clog2(WORDS),
  localparam int unsigned LINE_W = WORDS * DATA_W,
  localparam int unsigned SEL_W  = $clog2(CH_DEPTH),
  localparam int unsigned CID_W  = $clog2(NCACHE > 1 ? NCACHE : 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors
  input  logic [NCACHE-1:0] req_valid,
  output logic [NCACHE-1:0] req_ready,
  input  logic [NCACHE-1:0] req_we,
  input  logic [ADDR_W-1:0] req_addr   [NCACHE],
  input  logic [DATA_W-1:0] req_wdata  [NCACHE],
  output logic [NCACHE-1:0] resp_valid,
  output logic [DATA_W-1:0] resp_rdata [NCACHE],
  // channel delivery controls
  input  logic [NCACHE-1:0] sch_hold,
  input  logic [NCACHE-1:0] rch_hold,
  input  logic [SEL_W-1:0]  sch_sel    [NCACHE],
  input  logic [SEL_W-1:0]  rch_sel    [NCACHE],
  // unspecified receptions: pulse, dropped command, receiver's state/source
  output logic [NCACHE-1:0] cache_unspec,
  output m2c_e              cache_unspec_cmd   [NCACHE],
  output cstate_e           cache_unspec_state [NCACHE],
  output logic              dir_unspec,
  output c2m_e              dir_unspec_cmd,
  output logic [CID_W-1:0]  dir_unspec_src
);
  localparam int unsigned MSG_W = 3 + BLK_W + LINE_W;

  // cache -> sending channel
  logic              c_tx_valid [NCACHE];
  logic              c_tx_ready [NCACHE];
  c2m_e              c_tx_cmd   [NCACHE];
  logic [BLK_W-1:0]  c_tx_blk   [NCACHE];
  logic [LINE_W-1:0] c_tx_data  [NCACHE];
  // sending channel -> memory
  logic              m_in_valid [NCACHE];
  logic              m_in_ready [NCACHE];
  c2m_e              m_in_cmd   [NCACHE];
  logic [BLK_W-1:0]  m_in_blk   [NCACHE];
  logic [LINE_W-1:0] m_in_data  [NCACHE];
  logic [MSG_W-1:0]  sch_out    [NCACHE];
  // memory -> receiving channels
  logic [NCACHE-1:0] m_out_valid, m_out_space;
  m2c_e              m_out_cmd;
  logic [BLK_W-1:0]  m_out_blk;
  logic [LINE_W-1:0] m_out_data;
  // receiving channel -> cache
  logic              c_rx_valid [NCACHE];
  logic              c_rx_ready [NCACHE];
  logic [MSG_W-1:0]  rch_out    [NCACHE];

  for (genvar i = 0; i < NCACHE; i++) begin : g_base
    logic [SEL_W:0] sch_count, rch_count;
    logic           c_unspec;

    coh_cache #(
      .MEM_BLOCKS (MEM_BLOCKS),
      .WORDS      (WORDS),
      .DATA_W     (DATA_W),
      .CACHE_LINES(CACHE_LINES)
    ) u_cache (
      .clk, .rst_n,
      .req_valid   (req_valid[i]),
      .req_ready   (req_ready[i]),
      .req_we      (req_we[i]),
      .req_addr    (req_addr[i]),
      .req_wdata   (req_wdata[i]),
      .resp_valid  (resp_valid[i]),
      .resp_rdata  (resp_rdata[i]),
      .rx_valid    (c_rx_valid[i]),
      .rx_ready    (c_rx_ready[i]),
      .rx_cmd      (m2c_e'(rch_out[i][MSG_W-1 -: 3])),
      .rx_blk      (rch_out[i][LINE_W +: BLK_W]),
      .rx_data     (rch_out[i][LINE_W-1:0]),
      .tx_valid    (c_tx_valid[i]),
      .tx_ready    (c_tx_ready[i]),
      .tx_cmd      (c_tx_cmd[i]),
      .tx_blk      (c_tx_blk[i]),
      .tx_data     (c_tx_data[i]),
      .unspec_rx   (c_unspec),
      .unspec_cmd  (cache_unspec_cmd[i]),
      .unspec_state(cache_unspec_state[i])
    );
    assign cache_unspec[i] = c_unspec;

    // CH-: cache to memory
    coh_channel #(.W(MSG_W), .DEPTH(CH_DEPTH)) u_sch (
      .clk, .rst_n,
      .in_valid (c_tx_valid[i]),
      .in_ready (c_tx_ready[i]),
      .in_msg   ({c_tx_cmd[i], c_tx_blk[i], c_tx_data[i]}),
      .out_valid(m_in_valid[i]),
      .out_ready(m_in_ready[i]),
      .out_msg  (sch_out[i]),
      .hold     (sch_hold[i]),
      .sel      (sch_sel[i]),
      .count    (sch_count)
    );
    assign m_in_cmd[i]  = c2m_e'(sch_out[i][MSG_W-1 -: 3]);
    assign m_in_blk[i]  = sch_out[i][LINE_W +: BLK_W];
    assign m_in_data[i] = sch_out[i][LINE_W-1:0];

    // CH+: memory to cache
    coh_channel #(.W(MSG_W), .DEPTH(CH_DEPTH)) u_rch (
      .clk, .rst_n,
      .in_valid (m_out_valid[i]),
      .in_ready (m_out_space[i]),
      .in_msg   ({m_out_cmd, m_out_blk, m_out_data}),
      .out_valid(c_rx_valid[i]),
      .out_ready(c_rx_ready[i]),
      .out_msg  (rch_out[i]),
      .hold     (rch_hold[i]),
      .sel      (rch_sel[i]),
      .count    (rch_count)
    );
  end

  coh_directory #(
    .NCACHE    (NCACHE),
    .MEM_BLOCKS(MEM_BLOCKS),
    .WORDS     (WORDS),
    .DATA_W    (DATA_W)
  ) u_dir (
    .clk, .rst_n,
    .in_valid  (m_in_valid),
    .in_ready  (m_in_ready),
    .in_cmd    (m_in_cmd),
    .in_blk    (m_in_blk),
    .in_data   (m_in_data),
    .out_valid (m_out_valid),
    .out_space (m_out_space),
    .out_cmd   (m_out_cmd),
    .out_blk   (m_out_blk),
    .out_data  (m_out_data),
    .unspec_rx (dir_unspec),
    .unspec_cmd(dir_unspec_cmd),
    .unspec_src(dir_unspec_src)
  );

endmodule
