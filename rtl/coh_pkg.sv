// coh_pkg: types and default sizes shared by the full-map directory
// coherence system.
//
// The command set and the state names come from the protocol: five
// memory-to-cache commands (Inv, UpdM, Ownership, Data, Reject), seven
// cache-to-memory commands (ReqSC, ReqO, ReqOC, DxM, DOxM, Repl, IAck), three
// stable cache states (Invalid, Shared, Owner) plus three transient ones
// (read-miss-pending, write-miss-pending, write-hit-pending), and four
// directory entry states (free, XData, XOwn, XOwnC).
//
// The binary codes, the sizes (three caches, sixteen memory blocks of four
// 32-bit words, four cache lines per cache, eight-slot channels) and the
// packed message layout are this design's own choices. The three-cache
// default mirrors the three-processor system used to explain the protocol's
// races; the protocol itself works for any number of caches.
package coh_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int unsigned DEF_NCACHE      = 3;   // processors / caches
  parameter int unsigned DEF_MEM_BLOCKS  = 16;  // blocks of shared memory
  parameter int unsigned DEF_WORDS       = 4;   // words per block
  parameter int unsigned DEF_DATA_W      = 32;  // bits per word
  parameter int unsigned DEF_CACHE_LINES = 4;   // direct-mapped lines per cache
  parameter int unsigned DEF_CH_DEPTH    = 8;   // message slots per channel

  // ------------------------------------------------------------- commands
  // Memory to cache.
  typedef enum logic [2:0] {
    M2C_INV       = 3'd0,  // invalidate
    M2C_UPDM      = 3'd1,  // owner must update memory and become Shared
    M2C_OWNERSHIP = 3'd2,  // ownership granted (no data)
    M2C_DATA      = 3'd3,  // data copy supplied
    M2C_REJECT    = 3'd4   // directory entry locked, retry the request
  } m2c_e;

  // Cache to memory.
  typedef enum logic [2:0] {
    C2M_REQSC = 3'd0,  // request a Shared copy
    C2M_REQO  = 3'd1,  // request ownership (requester holds a Shared copy)
    C2M_REQOC = 3'd2,  // request ownership and a data copy
    C2M_DXM   = 3'd3,  // owner writes back, keeps a Shared copy
    C2M_DOXM  = 3'd4,  // owner writes back and invalidates itself
    C2M_REPL  = 3'd5,  // Shared copy replaced
    C2M_IACK  = 3'd6   // invalidation acknowledged
  } c2m_e;

  // ----------------------------------------------------------- states
  typedef enum logic [2:0] {
    CS_I   = 3'd0,  // Invalid
    CS_S   = 3'd1,  // Shared (clean, possibly in other caches)
    CS_O   = 3'd2,  // Owner (modified, only cached copy)
    CS_RMP = 3'd3,  // read miss pending
    CS_WMP = 3'd4,  // write miss pending
    CS_WHP = 3'd5   // write hit (on Shared) pending
  } cstate_e;

  typedef enum logic [1:0] {
    DS_FREE  = 2'd0,  // no request in progress
    DS_XDATA = 2'd1,  // waiting for the owner's write-back to serve a ReqSC
    DS_XOWN  = 2'd2,  // waiting for invalidations to grant a ReqO
    DS_XOWNC = 2'd3   // waiting for invalidations to grant a ReqOC with data
  } dstate_e;

endpackage
