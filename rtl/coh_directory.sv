// coh_directory: shared main memory with a full-map directory.
//
// For every memory block the directory keeps a presence-bit vector with one
// bit per cache, a dirty bit (some cache owns a modified copy), an entry
// state (free, XData, XOwn, XOwnC) and reqc, the cache whose request is in
// progress. A non-free entry is locked: a request for it is answered with
// Reject and must be retried by the cache.
//
// Each cycle the directory takes at most one cache-to-memory message from
// the sending channels (round-robin over the caches) and acts on it:
//   entry free
//     ReqSC      dirty: lock XData, reqc:=i, UpdM to the owner
//                clean: presence[i]:=1, Data to i (no locking)
//     ReqO/ReqOC no other presence bit: dirty:=1, Ownership to i (ReqO) or
//                presence[i]:=1 and Data to i (ReqOC)
//                otherwise: reqc:=i, lock XOwn/XOwnC, Inv to every other
//                cache whose presence bit is set
//     Repl       presence[i]:=0
//     DOxM       presence[i]:=0, dirty:=0, memory:=data
//   entry locked
//     ReqSC/ReqO/ReqOC  Reject to i
//     DxM        dirty:=0, memory:=data; in XData: Data to reqc,
//                presence[reqc]:=1, free
//     DOxM       dirty:=0, memory:=data, presence[i]:=0, presence[reqc]:=1;
//                Data to reqc in XData, in XOwnC also dirty:=1; free
//     Repl       presence[i]:=0
//     IAck       presence[i]:=0; if no presence bit other than reqc's is
//                left: XOwn -> dirty:=1, Ownership to reqc, free;
//                XOwnC -> dirty:=1, presence[reqc]:=1, Data to reqc, free
// A DxM or IAck reaching a free entry has no defined action: it is dropped
// and flagged on unspec_rx, like the cache controller does.
//
// This is the protocol as specified, including its known weaknesses: no
// check of the presence bits on ReqSC/ReqO, and a Repl in a locked entry
// that only clears the bit, so the last copy leaving by replacement never
// completes a pending ownership request. This design's own choices:
// setting presence[reqc] when an XOwnC request completes on the last IAck
// (the specification leaves it out there but sets it in every other path
// that hands out a data copy with ownership), taking the owner as the
// lowest-numbered cache with its presence bit set, one message per cycle,
// consuming a message only when every receiving channel has room
// (out_space all ones) since Inv may go to several caches at once, and
// memory contents that reset to zero.
//
// Interface: a message from cache i is consumed on the edge where
// in_valid[i] && in_ready[i]. The response messages of that step are
// presented in the same cycle on out_valid (one bit per receiving channel)
// with a common out_cmd/out_blk/out_data: every step sends at most one
// message to each cache.
module coh_directory
  import coh_pkg::*;
#(
  parameter int unsigned NCACHE     = coh_pkg::DEF_NCACHE,
  parameter int unsigned MEM_BLOCKS = coh_pkg::DEF_MEM_BLOCKS,
  parameter int unsigned WORDS      = coh_pkg::DEF_WORDS,
  parameter int unsigned DATA_W     = coh_pkg::DEF_DATA_W,
  localparam int unsigned BLK_W  = $clog2(MEM_BLOCKS),
  localparam int unsigned LINE_W = WORDS * DATA_W,
  localparam int unsigned CID_W  = (NCACHE > 1) ? $clog2(NCACHE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the sending channels
  input  logic              in_valid [NCACHE],
  output logic              in_ready [NCACHE],
  input  c2m_e              in_cmd   [NCACHE],
  input  logic [BLK_W-1:0]  in_blk   [NCACHE],
  input  logic [LINE_W-1:0] in_data  [NCACHE],
  // to the receiving channels
  output logic [NCACHE-1:0] out_valid,
  input  logic [NCACHE-1:0] out_space,
  output m2c_e              out_cmd,
  output logic [BLK_W-1:0]  out_blk,
  output logic [LINE_W-1:0] out_data,
  // unspecified reception detected (one-cycle pulse)
  output logic              unspec_rx,
  output c2m_e              unspec_cmd,
  output logic [CID_W-1:0]  unspec_src
);
  typedef logic [NCACHE-1:0] vec_t;

  // ------------------------------------------------------------ storage
  logic [LINE_W-1:0] mem      [MEM_BLOCKS];
  vec_t              presence [MEM_BLOCKS];
  logic              dirty    [MEM_BLOCKS];
  dstate_e           dst      [MEM_BLOCKS];
  logic [CID_W-1:0]  reqc     [MEM_BLOCKS];
  logic [CID_W-1:0]  rr_ptr;

  // ------------------------------------------------------------ arbitration
  logic             gnt_any;
  logic [CID_W-1:0] gnt;

  always_comb begin
    gnt_any = 1'b0;
    gnt     = '0;
    for (int k = NCACHE - 1; k >= 0; k--) begin
      int unsigned c;
      c = (int'(rr_ptr) + k) % NCACHE;
      if (in_valid[c]) begin
        gnt_any = 1'b1;
        gnt     = CID_W'(c);
      end
    end
  end

  logic step;
  assign step = gnt_any && (&out_space);

  always_comb
    for (int c = 0; c < NCACHE; c++) in_ready[c] = step && (gnt == CID_W'(c));

  // ------------------------------------------------------------ one step
  c2m_e              cmd;
  logic [BLK_W-1:0]  b;
  logic [LINE_W-1:0] wdata;
  vec_t              me, pres, others, rq_bit;
  logic [CID_W-1:0]  owner;
  logic              locked;

  assign cmd    = in_cmd[gnt];
  assign b      = in_blk[gnt];
  assign wdata  = in_data[gnt];
  assign me     = vec_t'(1) << gnt;
  assign pres   = presence[b];
  assign others = pres & ~me;
  assign rq_bit = vec_t'(1) << reqc[b];
  assign locked = (dst[b] != DS_FREE);

  always_comb begin
    owner = '0;
    for (int c = NCACHE - 1; c >= 0; c--) if (pres[c]) owner = CID_W'(c);
  end

  // next values of the addressed entry, and the outgoing message
  vec_t              n_pres;
  logic              n_dirty;
  dstate_e           n_dst;
  logic [CID_W-1:0]  n_reqc;
  logic              n_mem_we;
  logic              n_unspec;

  always_comb begin
    n_pres    = pres;
    n_dirty   = dirty[b];
    n_dst     = dst[b];
    n_reqc    = reqc[b];
    n_mem_we  = 1'b0;
    n_unspec  = 1'b0;
    out_valid = '0;
    out_cmd   = M2C_DATA;
    out_blk   = b;
    out_data  = mem[b];
    if (step) begin
      if (!locked) begin
        unique case (cmd)
          C2M_REQSC:
            if (dirty[b]) begin
              n_dst     = DS_XDATA;
              n_reqc    = gnt;
              out_cmd   = M2C_UPDM;
              out_valid = vec_t'(1) << owner;
            end else begin
              n_pres    = pres | me;
              out_cmd   = M2C_DATA;
              out_valid = me;
            end
          C2M_REQO, C2M_REQOC:
            if (others == '0) begin
              n_dirty = 1'b1;
              if (cmd == C2M_REQO) begin
                out_cmd = M2C_OWNERSHIP;
              end else begin
                n_pres  = pres | me;
                out_cmd = M2C_DATA;
              end
              out_valid = me;
            end else begin
              n_reqc    = gnt;
              n_dst     = (cmd == C2M_REQO) ? DS_XOWN : DS_XOWNC;
              out_cmd   = M2C_INV;
              out_valid = others;
            end
          C2M_REPL: n_pres = pres & ~me;
          C2M_DOXM: begin
            n_pres   = pres & ~me;
            n_dirty  = 1'b0;
            n_mem_we = 1'b1;
          end
          default: n_unspec = 1'b1;   // DxM, IAck on a free entry
        endcase
      end else begin
        unique case (cmd)
          C2M_REQSC, C2M_REQO, C2M_REQOC: begin
            out_cmd   = M2C_REJECT;
            out_valid = me;
          end
          C2M_DXM: begin
            n_dirty  = 1'b0;
            n_mem_we = 1'b1;
            if (dst[b] == DS_XDATA) begin
              out_cmd   = M2C_DATA;
              out_data  = wdata;
              out_valid = rq_bit;
              n_pres    = pres | rq_bit;
              n_dst     = DS_FREE;
            end
          end
          C2M_DOXM: begin
            n_dirty  = 1'b0;
            n_mem_we = 1'b1;
            n_pres   = (pres & ~me) | rq_bit;
            if (dst[b] == DS_XDATA || dst[b] == DS_XOWNC) begin
              out_cmd   = M2C_DATA;
              out_data  = wdata;
              out_valid = rq_bit;
              n_dirty   = (dst[b] == DS_XOWNC);
            end
            n_dst = DS_FREE;
          end
          C2M_REPL: n_pres = pres & ~me;
          C2M_IACK: begin
            n_pres = pres & ~me;
            if ((n_pres & ~rq_bit) == '0 && dst[b] != DS_XDATA) begin
              n_dirty   = 1'b1;
              out_valid = rq_bit;
              if (dst[b] == DS_XOWN) begin
                out_cmd = M2C_OWNERSHIP;
              end else begin
                out_cmd = M2C_DATA;
                n_pres  = n_pres | rq_bit;
              end
              n_dst = DS_FREE;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < MEM_BLOCKS; m++) begin
        mem[m]      <= '0;
        presence[m] <= '0;
        dirty[m]    <= 1'b0;
        dst[m]      <= DS_FREE;
        reqc[m]     <= '0;
      end
      rr_ptr     <= '0;
      unspec_rx  <= 1'b0;
      unspec_cmd <= C2M_REQSC;
      unspec_src <= '0;
    end else begin
      unspec_rx <= 1'b0;
      if (step) begin
        presence[b] <= n_pres;
        dirty[b]    <= n_dirty;
        dst[b]      <= n_dst;
        reqc[b]     <= n_reqc;
        if (n_mem_we) mem[b] <= wdata;
        rr_ptr <= (int'(gnt) == NCACHE - 1) ? '0 : gnt + 1'b1;
        if (n_unspec) begin
          unspec_rx  <= 1'b1;
          unspec_cmd <= cmd;
          unspec_src <= gnt;
        end
      end
    end
  end

  // A locked entry always names a real cache as its requester.
  for (genvar m = 0; m < MEM_BLOCKS; m++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     dst[m] != DS_FREE |-> int'(reqc[m]) < NCACHE);
  end

endmodule
