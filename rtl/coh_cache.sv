// coh_cache: one processor's cache and its coherence controller.
//
// The controller follows the write-invalidate protocol of a full-map
// directory scheme with no acknowledgement beyond the ones listed below.
// Every line is Invalid (I), Shared (S) or Owner (O), or in one of three
// transient states while a request is outstanding: read-miss-pending (RMP),
// write-miss-pending (WMP) and write-hit-pending (WHP).
//
// Processor side: the processor issues one load or store (req_valid &&
// req_ready), then waits for resp_valid; a load returns its word in
// resp_rdata, a store returns nothing. The processor is stalled meanwhile.
//   read hit (S or O) and write hit on O    -> answered locally
//   write hit on S                          -> WHP, send ReqO
//   miss, line Invalid                      -> RMP/WMP, send ReqSC/ReqOC
//   miss, line holds another block in S/O   -> replacement first: send Repl
//                                              (S) or DOxM with the data (O),
//                                              line to I, then the miss above
// Receiving side (one message from the receiving channel per cycle):
//   Inv       S -> I, send IAck;  O -> I, send DOxM with the data
//   UpdM      O -> S, send DxM with the data
//   Ownership WHP -> O, perform the pending store
//   Data      RMP -> S (answer the load);  WMP -> O (perform the store)
//   Reject    RMP/WMP/WHP: send the same request again
// Any other (message, state) pair is an unspecified reception: the protocol
// defines no action for it (e.g. Inv reaching an Invalid or pending line,
// UpdM reaching a pending line). The controller drops such a message, leaves
// its state unchanged and pulses unspec_rx for one cycle with the command
// and the line state, so that the system can detect the protocol hole.
//
// All of the above is the protocol as specified. This design's own choices:
// a direct-mapped cache of CACHE_LINES lines (the victim of a miss is the
// line the block maps to), handling one action per cycle with received
// messages taking priority over the pending processor request, acting only
// when the sending channel has room (tx_ready), a registered response one
// cycle after the deciding edge, and dropping unspecified receptions.
//
// Timing: a request is accepted on edge 0; a hit is answered on edge 1
// (resp_valid high after it). A miss sends its request on edge 1 (two edges
// later if a replacement comes first). A completing Data/Ownership consumed
// on edge k is answered after edge k.
module coh_cache
  import coh_pkg::*;
#(
  parameter int unsigned MEM_BLOCKS  = coh_pkg::DEF_MEM_BLOCKS,
  parameter int unsigned WORDS       = coh_pkg::DEF_WORDS,
  parameter int unsigned DATA_W      = coh_pkg::DEF_DATA_W,
  parameter int unsigned CACHE_LINES = coh_pkg::DEF_CACHE_LINES,
  localparam int unsigned BLK_W  = $clog2(MEM_BLOCKS),
  localparam int unsigned OFF_W  = $clog2(WORDS),
  localparam int unsigned ADDR_W = BLK_W + OFF_W,
  localparam int unsigned LINE_W = WORDS * DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              resp_valid,
  output logic [DATA_W-1:0] resp_rdata,
  // receiving channel (memory to cache)
  input  logic              rx_valid,
  output logic              rx_ready,
  input  m2c_e              rx_cmd,
  input  logic [BLK_W-1:0]  rx_blk,
  input  logic [LINE_W-1:0] rx_data,
  // sending channel (cache to memory)
  output logic              tx_valid,
  input  logic              tx_ready,
  output c2m_e              tx_cmd,
  output logic [BLK_W-1:0]  tx_blk,
  output logic [LINE_W-1:0] tx_data,
  // unspecified reception detected (one-cycle pulse)
  output logic              unspec_rx,
  output m2c_e              unspec_cmd,
  output cstate_e           unspec_state
);
  localparam int unsigned IDX_W = $clog2(CACHE_LINES);
  localparam int unsigned TAG_W = BLK_W - IDX_W;

  typedef logic [DATA_W-1:0] word_t;

  // ------------------------------------------------------------ storage
  cstate_e    st  [CACHE_LINES];
  logic [TAG_W-1:0] tag [CACHE_LINES];
  word_t      dat [CACHE_LINES][WORDS];

  // pending processor request
  logic              pend, pend_sent, pend_we;
  logic [ADDR_W-1:0] pend_addr;
  word_t             pend_wdata;

  logic [BLK_W-1:0]  p_blk;
  logic [IDX_W-1:0]  p_idx;
  logic [TAG_W-1:0]  p_tag;
  logic [OFF_W-1:0]  p_off;
  assign p_blk = pend_addr[ADDR_W-1 -: BLK_W];
  assign p_idx = p_blk[IDX_W-1:0];
  assign p_tag = p_blk[BLK_W-1 -: TAG_W];
  assign p_off = pend_addr[OFF_W-1:0];

  logic [IDX_W-1:0]  r_idx;
  logic [TAG_W-1:0]  r_tag;
  cstate_e           r_st;   // state of the addressed block (I if not present)
  assign r_idx = rx_blk[IDX_W-1:0];
  assign r_tag = rx_blk[BLK_W-1 -: TAG_W];
  assign r_st  = (tag[r_idx] == r_tag) ? st[r_idx] : CS_I;

  function automatic logic [LINE_W-1:0] pack_line(input word_t w [WORDS]);
    for (int k = 0; k < WORDS; k++) pack_line[k*DATA_W +: DATA_W] = w[k];
  endfunction

  // ------------------------------------------------------------ decisions
  typedef enum logic [3:0] {
    A_NONE, A_RX_INV_S, A_RX_INV_O, A_RX_UPDM, A_RX_OWN, A_RX_DATA_R,
    A_RX_DATA_W, A_RX_REJECT, A_RX_UNSPEC, A_P_HIT_R, A_P_HIT_W, A_P_UPGRADE,
    A_P_MISS, A_P_EVICT
  } act_e;

  act_e act;
  logic do_rx, do_proc;

  assign do_rx    = rx_valid && tx_ready;
  assign rx_ready = tx_ready;
  assign do_proc  = !rx_valid && tx_ready && pend && !pend_sent;
  assign req_ready = !pend;

  always_comb begin
    act = A_NONE;
    if (do_rx) begin
      act = A_RX_UNSPEC;
      unique case (rx_cmd)
        M2C_INV:       if (r_st == CS_S) act = A_RX_INV_S;
                       else if (r_st == CS_O) act = A_RX_INV_O;
        M2C_UPDM:      if (r_st == CS_O) act = A_RX_UPDM;
        M2C_OWNERSHIP: if (r_st == CS_WHP) act = A_RX_OWN;
        M2C_DATA:      if (r_st == CS_RMP) act = A_RX_DATA_R;
                       else if (r_st == CS_WMP) act = A_RX_DATA_W;
        M2C_REJECT:    if (r_st inside {CS_RMP, CS_WMP, CS_WHP}) act = A_RX_REJECT;
        default:       act = A_RX_UNSPEC;
      endcase
    end else if (do_proc) begin
      if (tag[p_idx] == p_tag && st[p_idx] inside {CS_S, CS_O}) begin
        if (!pend_we)               act = A_P_HIT_R;
        else if (st[p_idx] == CS_O) act = A_P_HIT_W;
        else                        act = A_P_UPGRADE;
      end else if (st[p_idx] == CS_I) begin
        act = A_P_MISS;
      end else begin
        act = A_P_EVICT;   // line holds another block in S or O
      end
    end
  end

  // Outgoing message for this cycle.
  always_comb begin
    tx_valid = 1'b1;
    tx_cmd   = C2M_IACK;
    tx_blk   = rx_blk;
    tx_data  = pack_line(dat[r_idx]);
    unique case (act)
      A_RX_INV_S:  tx_cmd = C2M_IACK;
      A_RX_INV_O:  tx_cmd = C2M_DOXM;
      A_RX_UPDM:   tx_cmd = C2M_DXM;
      A_RX_REJECT: tx_cmd = (r_st == CS_RMP) ? C2M_REQSC :
                            (r_st == CS_WMP) ? C2M_REQOC : C2M_REQO;
      A_P_UPGRADE: begin tx_cmd = C2M_REQO; tx_blk = p_blk; end
      A_P_MISS:    begin tx_cmd = pend_we ? C2M_REQOC : C2M_REQSC; tx_blk = p_blk; end
      A_P_EVICT: begin
        tx_cmd  = (st[p_idx] == CS_O) ? C2M_DOXM : C2M_REPL;
        tx_blk  = {tag[p_idx], p_idx};
        tx_data = pack_line(dat[p_idx]);
      end
      default:     tx_valid = 1'b0;
    endcase
  end

  // ------------------------------------------------------------ state update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < CACHE_LINES; l++) begin
        st[l]  <= CS_I;
        tag[l] <= '0;
        for (int k = 0; k < WORDS; k++) dat[l][k] <= '0;
      end
      pend         <= 1'b0;
      pend_sent    <= 1'b0;
      pend_we      <= 1'b0;
      pend_addr    <= '0;
      pend_wdata   <= '0;
      resp_valid   <= 1'b0;
      resp_rdata   <= '0;
      unspec_rx    <= 1'b0;
      unspec_cmd   <= M2C_INV;
      unspec_state <= CS_I;
    end else begin
      resp_valid <= 1'b0;
      unspec_rx  <= 1'b0;
      if (req_valid && req_ready) begin
        pend       <= 1'b1;
        pend_sent  <= 1'b0;
        pend_we    <= req_we;
        pend_addr  <= req_addr;
        pend_wdata <= req_wdata;
      end
      unique case (act)
        A_RX_INV_S, A_RX_INV_O: st[r_idx] <= CS_I;
        A_RX_UPDM:              st[r_idx] <= CS_S;
        A_RX_OWN: begin
          st[r_idx] <= CS_O;
          dat[r_idx][p_off] <= pend_wdata;
          resp_valid <= 1'b1;
          pend       <= 1'b0;
        end
        A_RX_DATA_R, A_RX_DATA_W: begin
          st[r_idx] <= (act == A_RX_DATA_R) ? CS_S : CS_O;
          for (int k = 0; k < WORDS; k++) begin
            if (act == A_RX_DATA_W && OFF_W'(k) == p_off)
              dat[r_idx][k] <= pend_wdata;
            else
              dat[r_idx][k] <= rx_data[k*DATA_W +: DATA_W];
          end
          resp_valid <= 1'b1;
          resp_rdata <= rx_data[p_off*DATA_W +: DATA_W];
          pend       <= 1'b0;
        end
        A_RX_UNSPEC: begin
          unspec_rx    <= 1'b1;
          unspec_cmd   <= rx_cmd;
          unspec_state <= r_st;
        end
        A_P_HIT_R: begin
          resp_valid <= 1'b1;
          resp_rdata <= dat[p_idx][p_off];
          pend       <= 1'b0;
        end
        A_P_HIT_W: begin
          dat[p_idx][p_off] <= pend_wdata;
          resp_valid <= 1'b1;
          pend       <= 1'b0;
        end
        A_P_UPGRADE: begin
          st[p_idx] <= CS_WHP;
          pend_sent <= 1'b1;
        end
        A_P_MISS: begin
          st[p_idx]  <= pend_we ? CS_WMP : CS_RMP;
          tag[p_idx] <= p_tag;
          pend_sent  <= 1'b1;
        end
        A_P_EVICT:  st[p_idx] <= CS_I;
        default: ;
      endcase
    end
  end

  // A line can only be in a transient state for the one pending request, so
  // a pending request never finds its line pending for another block.
  assert property (@(posedge clk) disable iff (!rst_n)
                   do_proc |-> !(st[p_idx] inside {CS_RMP, CS_WMP, CS_WHP}));

  initial assert (MEM_BLOCKS > CACHE_LINES && CACHE_LINES >= 2 && WORDS >= 2)
    else $error("coh_cache: need MEM_BLOCKS > CACHE_LINES >= 2 and WORDS >= 2");

endmodule
