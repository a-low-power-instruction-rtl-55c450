// tb_hbtc_bpt: self-checking testbench of the branch prediction table.
// A reference array of 2-bit saturating counters is trained with the same
// random updates; every cycle the prediction for a random lookup address and
// for the address just updated is compared with it. Directed sequences check
// the reset value, saturation at both ends and that aliasing addresses (same
// index bits) share an entry.
module tb_hbtc_bpt;
  import hbtc_pkg::*;

  localparam int unsigned ENTRIES = 2048;

  logic  clk = 1'b0;
  logic  rst_n;
  addr_t lk_pc, up_pc;
  logic  lk_taken, up_valid, up_taken;
  int    checks = 0, failures = 0;

  logic [1:0] ref_ctr [ENTRIES];

  hbtc_bpt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned idx(addr_t a);
    return int'(a[12:2]);
  endfunction

  task automatic check_pred(addr_t a, string what);
    lk_pc = a;
    #1;
    checks++;
    if (lk_taken !== ref_ctr[idx(a)][1]) begin
      failures++;
      $display("FAIL %s: pc=%h got %0b exp %0b", what, a, lk_taken, ref_ctr[idx(a)][1]);
    end
  endtask

  task automatic update(addr_t a, logic t);
    @(negedge clk);
    up_valid = 1'b1; up_pc = a; up_taken = t;
    @(posedge clk);
    if (t && ref_ctr[idx(a)] != 2'd3) ref_ctr[idx(a)]++;
    else if (!t && ref_ctr[idx(a)] != 2'd0) ref_ctr[idx(a)]--;
    #1 up_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; up_valid = 1'b0; up_pc = '0; up_taken = 1'b0; lk_pc = '0;
    for (int i = 0; i < ENTRIES; i++) ref_ctr[i] = 2'd1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // reset value: weakly not-taken everywhere
    for (int i = 0; i < 64; i++) check_pred(addr_t'($urandom), "reset");

    // one taken update flips a fresh entry to taken, saturation at 3
    update(32'h0000_0100, 1'b1);  check_pred(32'h0000_0100, "one taken");
    repeat (5) update(32'h0000_0100, 1'b1);
    update(32'h0000_0100, 1'b0);  check_pred(32'h0000_0100, "hysteresis");
    update(32'h0000_0100, 1'b0);  check_pred(32'h0000_0100, "two not-taken");
    repeat (5) update(32'h0000_0100, 1'b0);
    update(32'h0000_0100, 1'b1);  check_pred(32'h0000_0100, "saturate low");
    // an address 8 KB away aliases onto the same entry
    check_pred(32'h0000_2100, "alias");

    // random training
    for (int n = 0; n < 3000; n++) begin
      addr_t a;
      a = {19'($urandom), 4'($urandom), 9'($urandom)} & 32'hFFFF_FFFC;
      if (n % 3 == 0) a = a & 32'h0000_00FC;   // concentrate on a few entries
      update(a, 1'($urandom));
      check_pred(a, "random updated");
      check_pred(addr_t'($urandom), "random lookup");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
