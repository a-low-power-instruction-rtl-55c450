// tb_hbtc_btb: self-checking testbench of the footprint BTB.
// An independent reference keeps, per set, a recency-ordered list of entries
// (most recent first, at most WAYS long) with tag, target, RCT and RCN. The
// stimulus draws branch addresses from a pool in which many addresses share
// one set, so allocations evict by LRU; it resolves them taken or not-taken
// with random footprint permission and random cache-fill erasures. Every
// cycle the lookup of a pool address and the up_hit/up_alloc indications are
// compared with the reference. Directed steps first check that RCT and RCN
// follow the paper's rules on a single entry.
module tb_hbtc_btb;
  import hbtc_pkg::*;

  localparam int unsigned SETS = 512;
  localparam int unsigned WAYS = 4;

  logic  clk = 1'b0;
  logic  rst_n;
  addr_t lk_pc, lk_target, up_pc, up_target;
  logic  lk_hit, lk_rct, lk_rcn;
  logic  up_valid, up_taken, up_set_fp, up_hit, up_alloc, fp_clear;
  int    checks = 0, failures = 0;

  hbtc_btb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    addr_t pc;
    addr_t target;
    logic  rct;
    logic  rcn;
  } ref_e;

  ref_e ref_set [SETS][$];

  function automatic int unsigned set_of(addr_t a);
    return int'(a[10:2]);
  endfunction

  function automatic int find(addr_t a);
    int unsigned s = set_of(a);
    foreach (ref_set[s][i]) if (ref_set[s][i].pc == a) return i;
    return -1;
  endfunction

  task automatic check_lookup(addr_t a, string what);
    int i;
    lk_pc = a;
    #1;
    i = find(a);
    checks++;
    if (i < 0) begin
      if (lk_hit !== 1'b0) begin
        failures++; $display("FAIL %s: pc=%h unexpected hit", what, a);
      end
    end else begin
      ref_e e = ref_set[set_of(a)][i];
      if (lk_hit !== 1'b1 || lk_target !== e.target || lk_rct !== e.rct || lk_rcn !== e.rcn) begin
        failures++;
        $display("FAIL %s: pc=%h hit=%0b tgt=%h rct=%0b rcn=%0b exp tgt=%h rct=%0b rcn=%0b",
                 what, a, lk_hit, lk_target, lk_rct, lk_rcn, e.target, e.rct, e.rcn);
      end
    end
  endtask

  task automatic update(addr_t a, logic t, addr_t tgt, logic fp, logic clr);
    int i;
    int unsigned s;
    logic exp_alloc;
    @(negedge clk);
    up_valid = 1'b1; up_pc = a; up_taken = t; up_target = tgt; up_set_fp = fp; fp_clear = clr;
    #1;
    i = find(a);
    s = set_of(a);
    exp_alloc = (i < 0) && t;
    checks++;
    if (up_hit !== (i >= 0) || up_alloc !== exp_alloc) begin
      failures++;
      $display("FAIL update pc=%h up_hit=%0b up_alloc=%0b exp %0b %0b", a, up_hit, up_alloc, i >= 0, exp_alloc);
    end
    @(posedge clk);
    // reference update
    if (clr || exp_alloc)
      for (int k = 0; k < SETS; k++)
        foreach (ref_set[k][j]) begin ref_set[k][j].rct = 1'b0; ref_set[k][j].rcn = 1'b0; end
    if (i >= 0) begin
      ref_e e = ref_set[s][i];
      ref_set[s].delete(i);
      if (t) e.target = tgt;
      if (fp && !clr) begin
        if (t) e.rct = 1'b1; else e.rcn = 1'b1;
      end
      ref_set[s].push_front(e);
    end else if (t) begin
      ref_e e;
      e.pc = a; e.target = tgt; e.rct = !clr; e.rcn = 1'b0;
      if (ref_set[s].size() == WAYS) void'(ref_set[s].pop_back());
      ref_set[s].push_front(e);
    end
    #1;
    up_valid = 1'b0; fp_clear = 1'b0;
  endtask

  task automatic erase_only();
    @(negedge clk);
    fp_clear = 1'b1;
    @(posedge clk);
    for (int k = 0; k < SETS; k++)
      foreach (ref_set[k][j]) begin ref_set[k][j].rct = 1'b0; ref_set[k][j].rcn = 1'b0; end
    #1 fp_clear = 1'b0;
  endtask

  addr_t pool [20];

  initial begin
    rst_n = 1'b0; up_valid = 1'b0; up_pc = '0; up_taken = 1'b0; up_target = '0;
    up_set_fp = 1'b0; fp_clear = 1'b0; lk_pc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // directed: one branch
    check_lookup(32'h0000_0040, "empty");
    update(32'h0000_0040, 1'b0, 32'h0, 1'b1, 1'b0);      // not-taken miss: no allocation
    check_lookup(32'h0000_0040, "not-taken miss");
    update(32'h0000_0040, 1'b1, 32'h0000_0010, 1'b1, 1'b0); // allocate, RCT=1
    check_lookup(32'h0000_0040, "allocated");
    update(32'h0000_0040, 1'b0, 32'h0, 1'b1, 1'b0);      // not taken: RCN=1
    check_lookup(32'h0000_0040, "rcn set");
    update(32'h0000_0040, 1'b0, 32'h0, 1'b0, 1'b0);      // no permission: unchanged
    check_lookup(32'h0000_0040, "no permission");
    erase_only();
    check_lookup(32'h0000_0040, "erased by fill");
    update(32'h0000_0040, 1'b1, 32'h0000_0020, 1'b0, 1'b0); // target change, no fp
    check_lookup(32'h0000_0040, "new target");
    update(32'h0000_0040, 1'b1, 32'h0000_0020, 1'b1, 1'b0);
    update(32'h0000_0040, 1'b0, 32'h0, 1'b1, 1'b0);
    check_lookup(32'h0000_0040, "both flags");
    update(32'h0000_0844, 1'b1, 32'h0000_0100, 1'b1, 1'b0); // other branch allocates: erase all
    check_lookup(32'h0000_0040, "erased by replacement");
    check_lookup(32'h0000_0844, "second entry");

    // pool: 12 branches in set 3, 8 scattered
    for (int k = 0; k < 12; k++) pool[k] = 32'(k) * 32'h800 + 32'h0000_000C + 32'h0001_0000;
    for (int k = 12; k < 20; k++) pool[k] = {16'($urandom), 14'($urandom), 2'b00};

    for (int n = 0; n < 4000; n++) begin
      addr_t a;
      a = pool[$urandom % 20];
      if ($urandom % 8 == 0) a = pool[$urandom % 5];
      update(a, 1'($urandom), {20'h0, 10'($urandom), 2'b00}, 1'($urandom), ($urandom % 10) == 0);
      check_lookup(a, "random updated");
      check_lookup(pool[$urandom % 20], "random pool");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
