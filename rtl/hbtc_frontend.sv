// hbtc_frontend: instruction fetch front end with a history-based
// tag-comparison (H-TC) instruction cache.
//
// Each cycle the PC addresses the direct-mapped instruction cache, the BTB and
// the branch prediction table (BPT) in parallel. On a BTB hit the prediction
// selects the next PC (target or PC+4) and, at the same time, the execution
// footprint of the predicted direction (RCT or RCN) is copied into the TCO
// flag. While TCO is 1 the cache does not read or compare its tags: the
// footprint guarantees that the dynamic basic-block now being fetched was
// fetched before and that no miss or BTB replacement has happened since.
// Any line fill and any BTB replacement erases all footprints and TCO.
//
// Branch resolution comes back from the core, in program order, on res. The
// front end then trains the BPT, updates or allocates the BTB entry and sets
// the footprint of the resolved direction. This design adds three rules the
// method leaves open:
//   * a footprint is set for a correctly predicted branch only if no fill or
//     replacement happened between the branch's fetch and its resolution. An
//     epoch counter, bumped on each erase and carried in the prediction record,
//     detects that. After a misprediction the footprint of the real direction
//     is set at once, since its segment only starts at the redirect.
//   * a misprediction redirects the PC and resets TCO. The instruction the
//     cache delivers in that same cycle is dropped (fetch_valid stays 0).
//   * footprints are erased when the refilled line is written, not when the
//     miss is detected. A branch that resolves while the refill is pending
//     still carries the current epoch and sets its footprint; only the erase
//     at the write removes it before the evicted line can be skipped.
// Without a core stall signal the front end assumes the core takes one
// instruction per cycle whenever fetch_valid is 1.
//
// Timing: fetch is single cycle on a hit; a miss stalls fetch until the line
// arrives on the refill port (see hbtc_icache). A resolution may arrive in any
// cycle, including during a refill, in which case the PC is redirected and the
// refill of the wrong-path line still completes.
module hbtc_frontend #(
  parameter int unsigned     CACHE_BYTES = 32768,
  parameter int unsigned     LINE_BYTES  = 32,
  parameter bit              INTERLINE   = 1'b0,
  parameter int unsigned     BTB_SETS    = 512,
  parameter int unsigned     BTB_WAYS    = 4,
  parameter int unsigned     BPT_ENTRIES = 2048,
  parameter hbtc_pkg::addr_t RESET_PC    = '0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // instruction stream to the core
  output logic                      fetch_valid,
  output hbtc_pkg::addr_t           fetch_pc,
  output hbtc_pkg::instr_t          fetch_instr,
  output hbtc_pkg::pred_info_t      fetch_pred,
  // branch resolution from the core
  input  hbtc_pkg::resolve_t        res,
  // refill port to the next memory level
  output logic                      mem_req,
  output hbtc_pkg::addr_t           mem_addr,
  input  logic                      mem_resp_valid,
  input  logic [LINE_BYTES*8-1:0]   mem_resp_data,
  // observation
  output logic                      tco,
  output hbtc_pkg::stats_t          stats
);
  import hbtc_pkg::*;

  addr_t  pc;
  epoch_t epoch;

  // cache
  logic   c_resp_valid, c_tag_cmp, c_miss, c_fill, c_busy;
  instr_t c_instr;

  hbtc_icache #(
    .CACHE_BYTES (CACHE_BYTES),
    .LINE_BYTES  (LINE_BYTES),
    .INTERLINE   (INTERLINE)
  ) u_icache (
    .clk            (clk),
    .rst_n          (rst_n),
    .req_valid      (1'b1),
    .req_addr       (pc),
    .tag_cmp_en     (!tco),
    .resp_valid     (c_resp_valid),
    .resp_instr     (c_instr),
    .tag_cmp        (c_tag_cmp),
    .miss           (c_miss),
    .fill           (c_fill),
    .busy           (c_busy),
    .mem_req        (mem_req),
    .mem_addr       (mem_addr),
    .mem_resp_valid (mem_resp_valid),
    .mem_resp_data  (mem_resp_data)
  );

  // branch prediction
  logic  btb_hit, btb_rct, btb_rcn, bpt_taken, pred_taken;
  addr_t btb_target, pred_next;
  logic  up_alloc, set_fp, mispredict;
  addr_t actual_next;

  hbtc_btb #(
    .SETS (BTB_SETS),
    .WAYS (BTB_WAYS)
  ) u_btb (
    .clk       (clk),
    .rst_n     (rst_n),
    .lk_pc     (pc),
    .lk_hit    (btb_hit),
    .lk_target (btb_target),
    .lk_rct    (btb_rct),
    .lk_rcn    (btb_rcn),
    .up_valid  (res.valid),
    .up_pc     (res.pc),
    .up_taken  (res.taken),
    .up_target (res.target),
    .up_set_fp (set_fp),
    .up_hit    (),
    .up_alloc  (up_alloc),
    .fp_clear  (c_fill)
  );

  hbtc_bpt #(
    .ENTRIES (BPT_ENTRIES)
  ) u_bpt (
    .clk      (clk),
    .rst_n    (rst_n),
    .lk_pc    (pc),
    .lk_taken (bpt_taken),
    .up_valid (res.valid),
    .up_pc    (res.pc),
    .up_taken (res.taken)
  );

  assign pred_taken  = btb_hit && bpt_taken;
  assign pred_next   = pred_taken ? btb_target : pc + addr_t'(INSTR_BYTES);
  assign actual_next = res.taken ? res.target : res.pc + addr_t'(INSTR_BYTES);
  assign mispredict  = res.valid && actual_next != res.pred.next_pc;
  assign set_fp      = mispredict || res.pred.epoch == epoch;

  // TCO flag
  logic tco_load, tco_clear;
  assign tco_load  = fetch_valid && btb_hit;
  assign tco_clear = c_fill || up_alloc || mispredict;

  hbtc_tco u_tco (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (tco_load),
    .pred_taken (pred_taken),
    .rct        (btb_rct),
    .rcn        (btb_rcn),
    .clear      (tco_clear),
    .tco        (tco)
  );

  // PC, incrementer and next-PC selection
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc    <= RESET_PC;
      epoch <= '0;
    end else begin
      if (mispredict)       pc <= actual_next;
      else if (fetch_valid) pc <= pred_next;
      if (c_fill || up_alloc) epoch <= epoch + epoch_t'(1);
    end
  end

  assign fetch_valid            = c_resp_valid && !mispredict;
  assign fetch_pc               = pc;
  assign fetch_instr            = c_instr;
  assign fetch_pred.btb_hit     = btb_hit;
  assign fetch_pred.pred_taken  = pred_taken;
  assign fetch_pred.next_pc     = pred_next;
  assign fetch_pred.epoch       = epoch;

  assign stats.access       = fetch_valid;
  assign stats.tag_cmp      = c_tag_cmp;
  assign stats.miss         = c_miss;
  assign stats.fill         = c_fill;
  assign stats.btb_replace  = up_alloc;
  assign stats.redirect     = mispredict;
  assign stats.tco_from_rct = tco_load && !tco_clear && pred_taken && btb_rct;
  assign stats.tco_from_rcn = tco_load && !tco_clear && !pred_taken && btb_rcn;

  // the next level answers only an outstanding refill request
  a_resp_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> mem_req);
  // tags are skipped only while the cache is idle and trusted, never during refill
  a_no_miss_when_omitted: assert property (@(posedge clk) disable iff (!rst_n)
    (tco && !c_busy) |-> !c_miss);

endmodule
