// hbtc_pkg: types and constants shared by the history-based tag-comparison
// (H-TC) instruction fetch front end.
//
// The front end fetches one 32-bit instruction per cycle from a direct-mapped
// instruction cache. Every fetched instruction leaves with a prediction record
// (pred_info_t); the core hands the record back, together with the real
// outcome, when it resolves a branch (resolve_t). The record carries the
// footprint epoch of the fetch so that the front end can tell whether a cache
// miss or BTB replacement happened between fetch and resolution.
//
// The 32-bit address, 4-byte instruction, 32-byte line and the cache/BTB/BPT
// sizes used as module defaults follow the evaluated configuration; the record
// layout, the epoch and its width are choices of this design.
package hbtc_pkg;

  localparam int unsigned XLEN        = 32;  // address and instruction width
  localparam int unsigned EPOCH_W     = 8;   // width of the footprint epoch counter
  localparam int unsigned INSTR_BYTES = 4;

  typedef logic [XLEN-1:0]    addr_t;
  typedef logic [XLEN-1:0]    instr_t;
  typedef logic [EPOCH_W-1:0] epoch_t;

  // Prediction made for one fetched instruction.
  typedef struct packed {
    logic   btb_hit;     // the fetch address hit in the BTB
    logic   pred_taken;  // predicted taken (BTB hit and BPT says taken)
    addr_t  next_pc;     // address fetched after this instruction
    epoch_t epoch;       // footprint epoch at fetch time
  } pred_info_t;

  // Branch resolution reported by the core, in program order.
  typedef struct packed {
    logic       valid;   // a branch or jump is resolved this cycle
    addr_t      pc;      // its address
    logic       taken;   // actual direction
    addr_t      target;  // actual target when taken
    pred_info_t pred;    // record the front end emitted with it
  } resolve_t;

  // One-cycle event strobes for counting (energy / statistics).
  typedef struct packed {
    logic access;        // an instruction was delivered this cycle
    logic tag_cmp;       // the tag array was read and compared
    logic miss;          // a miss was detected
    logic fill;          // a line was written, all footprints erased
    logic btb_replace;   // a BTB entry was allocated, all footprints erased
    logic redirect;      // a misprediction redirected the fetch
    logic tco_from_rct;  // TCO loaded with 1 from an RCT flag
    logic tco_from_rcn;  // TCO loaded with 1 from an RCN flag
  } stats_t;

endpackage
