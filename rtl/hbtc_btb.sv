// hbtc_btb: branch target buffer extended with execution footprints.
//
// A SETS x WAYS set-associative BTB (512 sets of 4 ways in the evaluated
// configuration). Each entry holds the branch address tag and the target
// address, as in an ordinary BTB, plus two 1-bit footprints:
//   RCT - the dynamic basic-block that starts at the target is known to be in
//         the instruction cache;
//   RCN - the fall-through instructions after the branch are known to be in
//         the instruction cache.
// RCT is set when the branch resolves taken, RCN when it resolves not-taken,
// provided the front end says the footprint is still trustworthy (up_set_fp).
// All RCT and RCN flags of the whole BTB are erased at once when the cache
// fills a line (fp_clear) and whenever a new entry is allocated; the flags are
// therefore kept in flip-flops, not in the tag/target RAM.
//
// Choices of this design: entries are allocated only for taken branches that
// missed; every allocation, into an invalid way or not, counts as a
// replacement and erases all footprints; the new entry starts with RCT=1 (its
// target segment begins right after the redirect) and RCN=0, unless a fill
// erases footprints in the same cycle; replacement is true LRU kept as a
// 2-bit age per way (0 = most recent); the set index is the word address
// modulo SETS and the tag is the rest of the address.
//
// Interface and timing: the lookup port is combinational (lk_pc -> lk_*).
// The update port is sampled at the rising edge; up_alloc is the
// combinational "this update allocates (replaces)" indication so that the
// caller can reset TCO in the same edge. Active-low synchronous reset
// invalidates all entries and clears all footprints.
module hbtc_btb #(
  parameter int unsigned SETS = 512,
  parameter int unsigned WAYS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // fetch-side lookup
  input  hbtc_pkg::addr_t    lk_pc,
  output logic               lk_hit,
  output hbtc_pkg::addr_t    lk_target,
  output logic               lk_rct,
  output logic               lk_rcn,
  // resolution-side update
  input  logic               up_valid,
  input  hbtc_pkg::addr_t    up_pc,
  input  logic               up_taken,
  input  hbtc_pkg::addr_t    up_target,
  input  logic               up_set_fp,   // footprint of this direction may be set
  output logic               up_hit,
  output logic               up_alloc,    // a replacement happens at this edge
  // erase all footprints (cache fill)
  input  logic               fp_clear
);
  import hbtc_pkg::*;

  localparam int unsigned IW = $clog2(SETS);
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TW = XLEN - IW - 2;

  typedef logic [TW-1:0]     tag_t;
  typedef logic [XLEN-3:0]   tgt_t;   // word address of the target
  typedef logic [WW-1:0]     age_t;

  logic [WAYS-1:0] valid [SETS];
  logic [WAYS-1:0] rct   [SETS];
  logic [WAYS-1:0] rcn   [SETS];
  tag_t            tags  [SETS][WAYS];
  tgt_t            tgts  [SETS][WAYS];
  age_t            age   [SETS][WAYS];

  // ---------------------------------------------------------------- lookup
  logic [IW-1:0] lk_set;
  tag_t          lk_tag;
  assign lk_set = lk_pc[IW+1:2];
  assign lk_tag = lk_pc[XLEN-1:IW+2];

  logic [WAYS-1:0] lk_way_hit;

  always_comb begin
    lk_hit    = 1'b0;
    lk_target = '0;
    lk_rct    = 1'b0;
    lk_rcn    = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      lk_way_hit[w] = valid[lk_set][w] && tags[lk_set][w] == lk_tag;
      if (lk_way_hit[w]) begin
        lk_hit    = 1'b1;
        lk_target = {tgts[lk_set][w], 2'b00};
        lk_rct    = rct[lk_set][w];
        lk_rcn    = rcn[lk_set][w];
      end
    end
  end

  // ---------------------------------------------------------------- update
  logic [IW-1:0] up_set;
  tag_t          up_tag;
  logic [WW-1:0] up_way, victim;
  logic          have_invalid;

  assign up_set = up_pc[IW+1:2];
  assign up_tag = up_pc[XLEN-1:IW+2];

  always_comb begin
    up_hit = 1'b0;
    up_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[up_set][w] && tags[up_set][w] == up_tag) begin
        up_hit = 1'b1;
        up_way = WW'(w);
      end
    end
    // victim: lowest invalid way, else the least recently used one
    have_invalid = 1'b0;
    victim       = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!have_invalid && age[up_set][w] == age_t'(WAYS - 1)) victim = WW'(w);
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[up_set][w]) begin
        have_invalid = 1'b1;
        victim       = WW'(w);
      end
    end
  end

  assign up_alloc = up_valid && up_taken && !up_hit;

  logic          touch;
  logic [WW-1:0] touch_way;
  assign touch     = up_valid && (up_hit || up_taken);
  assign touch_way = up_hit ? up_way : victim;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        rct[s]   <= '0;
        rcn[s]   <= '0;
        for (int w = 0; w < WAYS; w++) age[s][w] <= age_t'(w);
      end
    end else begin
      // footprint erase: cache fill or replacement
      if (fp_clear || up_alloc) begin
        for (int s = 0; s < SETS; s++) begin
          rct[s] <= '0;
          rcn[s] <= '0;
        end
      end
      if (up_valid) begin
        if (up_hit) begin
          if (up_taken) tgts[up_set][up_way] <= up_target[XLEN-1:2];
          if (up_set_fp && !fp_clear) begin
            if (up_taken) rct[up_set][up_way] <= 1'b1;
            else          rcn[up_set][up_way] <= 1'b1;
          end
        end else if (up_taken) begin
          valid[up_set][victim] <= 1'b1;
          tags [up_set][victim] <= up_tag;
          tgts [up_set][victim] <= up_target[XLEN-1:2];
          rct  [up_set][victim] <= !fp_clear;
          rcn  [up_set][victim] <= 1'b0;
        end
      end
      // true LRU ages
      if (touch) begin
        for (int w = 0; w < WAYS; w++) begin
          if (WW'(w) == touch_way)                         age[up_set][w] <= '0;
          else if (age[up_set][w] < age[up_set][touch_way]) age[up_set][w] <= age[up_set][w] + age_t'(1);
        end
      end
    end
  end

  // a branch is never held in two ways of its set
  a_single_way: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lk_way_hit));

endmodule
