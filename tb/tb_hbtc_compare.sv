// tb_hbtc_compare: runs the test program on two front ends, the main
// configuration (footprints only, H-TC) and INTERLINE=1 (footprints plus
// interline omission, HIL-TC), and prints the number of tag comparisons of
// each, normalised to a cache that compares on every access (C-TC). The
// interline-only figure (IL-TC) is counted from the instruction stream: one
// comparison each time a fetch leaves the line of the previous one, plus one
// per miss. Checks: both instruction streams are correct and identical in
// length, and the orderings HIL <= H < C and HIL <= IL hold.
module tb_hbtc_compare;
  import hbtc_pkg::*;

  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LAT        = 6;
  localparam int unsigned CYCLES     = 60000;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two complete systems: [0] main configuration, [1] with interline omission
  logic       fetch_valid [2];
  addr_t      fetch_pc [2], mem_addr [2];
  instr_t     fetch_instr [2];
  pred_info_t fetch_pred [2];
  resolve_t   res [2];
  logic       mem_req [2], mem_resp_valid [2], tco [2];
  logic [LINE_BYTES*8-1:0] mem_resp_data [2];
  stats_t     stats [2];
  int unsigned n_req [2], n_instr [2], n_err [2], n_lc [2];
  int unsigned n_cmp [2], n_miss [2], n_acc [2];

  for (genvar g = 0; g < 2; g++) begin : g_sys
    hbtc_frontend #(.INTERLINE(g == 1)) fe (
      .clk, .rst_n,
      .fetch_valid (fetch_valid[g]), .fetch_pc (fetch_pc[g]), .fetch_instr (fetch_instr[g]),
      .fetch_pred (fetch_pred[g]), .res (res[g]),
      .mem_req (mem_req[g]), .mem_addr (mem_addr[g]),
      .mem_resp_valid (mem_resp_valid[g]), .mem_resp_data (mem_resp_data[g]),
      .tco (tco[g]), .stats (stats[g]));
    hbtc_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(LAT)) mem (
      .clk, .rst_n, .req (mem_req[g]), .addr (mem_addr[g]),
      .resp_valid (mem_resp_valid[g]), .resp_data (mem_resp_data[g]), .n_req (n_req[g]));
    hbtc_tb_core core (
      .clk, .rst_n,
      .fetch_valid (fetch_valid[g]), .fetch_pc (fetch_pc[g]), .fetch_instr (fetch_instr[g]),
      .fetch_pred (fetch_pred[g]), .res (res[g]),
      .n_instr (n_instr[g]), .n_err (n_err[g]), .n_line_change (n_lc[g]), .n_wrong_path ());

    always @(posedge clk) begin
      if (!rst_n) begin
        n_cmp[g] <= 0; n_miss[g] <= 0; n_acc[g] <= 0;
      end else begin
        if (stats[g].tag_cmp) n_cmp[g]  <= n_cmp[g] + 1;
        if (stats[g].miss)    n_miss[g] <= n_miss[g] + 1;
        if (stats[g].access)  n_acc[g]  <= n_acc[g] + 1;
      end
    end
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int unsigned c_tc, il_tc;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (CYCLES) @(posedge clk);
    #1;
    // C-TC compares on every delivery and on every miss cycle
    c_tc  = n_acc[0] + n_miss[0];
    il_tc = n_lc[0] + n_miss[0];
    $display("instructions %0d / %0d, misses %0d / %0d", n_instr[0], n_instr[1], n_miss[0], n_miss[1]);
    $display("tag comparisons normalised to C-TC (%0d):", c_tc);
    $display("  C-TC   1.000");
    $display("  IL-TC  %0.4f", real'(il_tc) / real'(c_tc));
    $display("  H-TC   %0.4f", real'(n_cmp[0]) / real'(c_tc));
    $display("  HIL-TC %0.4f", real'(n_cmp[1]) / real'(c_tc));
    check(n_err[0] == 0 && n_err[1] == 0, "instruction streams correct");
    check(n_instr[0] > CYCLES / 2, "main configuration makes progress");
    check(n_instr[1] > CYCLES / 2, "interline configuration makes progress");
    check(n_miss[0] == n_miss[1], "both configurations miss alike");
    check(n_cmp[0] < c_tc, "H-TC compares less than C-TC");
    check(n_cmp[1] <= n_cmp[0], "HIL-TC compares no more than H-TC");
    check(n_cmp[1] <= il_tc, "HIL-TC compares no more than IL-TC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
