// tb_hbtc_stress: safety stress of the footprint mechanism on random
// programs. Each 48 KB random program of hbtc_tb_prog_pkg (PROG=k) overflows
// the 32 KB cache and has thousands of branches, so misses, BTB replacements,
// mispredictions and footprint reuse interleave in every combination the
// random control flow produces. NPROG programs each run four times side by
// side at default sizes: on the main configuration and on INTERLINE=1, each
// with a core that resolves branches 1 cycle and LONG_DELAY cycles after
// delivery. The long delay exceeds the miss penalty, so fills (also from
// wrong-path fetches) land between a branch's fetch and its resolution, which
// is what the footprint epoch guards against. The core models check every delivered instruction
// against the program, so any omitted comparison that hit a replaced line
// fails the test. Also checked: progress, that comparisons were omitted at
// all, and that misses, replacements and redirects occurred.
module tb_hbtc_stress;
  import hbtc_pkg::*;

  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LAT        = 5;
  localparam int unsigned CYCLES     = 200000;
  localparam int unsigned NPROG      = 6;
  localparam int unsigned NSYS       = 4 * NPROG;
  localparam int          LONG_DELAY = 9;

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

  logic       fetch_valid [NSYS];
  addr_t      fetch_pc [NSYS], mem_addr [NSYS];
  instr_t     fetch_instr [NSYS];
  pred_info_t fetch_pred [NSYS];
  resolve_t   res [NSYS];
  logic       mem_req [NSYS], mem_resp_valid [NSYS], tco [NSYS];
  logic [LINE_BYTES*8-1:0] mem_resp_data [NSYS];
  stats_t     stats [NSYS];
  int unsigned n_req [NSYS], n_instr [NSYS], n_err [NSYS], n_lc [NSYS], n_wp [NSYS];
  int unsigned n_omit [NSYS], n_miss [NSYS], n_repl [NSYS], n_redir [NSYS];

  for (genvar g = 0; g < NSYS; g++) begin : g_sys
    hbtc_frontend #(.INTERLINE(g % 2 == 1)) fe (
      .clk, .rst_n,
      .fetch_valid (fetch_valid[g]), .fetch_pc (fetch_pc[g]), .fetch_instr (fetch_instr[g]),
      .fetch_pred (fetch_pred[g]), .res (res[g]),
      .mem_req (mem_req[g]), .mem_addr (mem_addr[g]),
      .mem_resp_valid (mem_resp_valid[g]), .mem_resp_data (mem_resp_data[g]),
      .tco (tco[g]), .stats (stats[g]));
    hbtc_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(LAT), .PROG(1 + g / 4)) mem (
      .clk, .rst_n, .req (mem_req[g]), .addr (mem_addr[g]),
      .resp_valid (mem_resp_valid[g]), .resp_data (mem_resp_data[g]), .n_req (n_req[g]));
    hbtc_tb_core #(.PROG(1 + g / 4), .RES_DELAY((g / 2) % 2 == 1 ? LONG_DELAY : 1)) core (
      .clk, .rst_n,
      .fetch_valid (fetch_valid[g]), .fetch_pc (fetch_pc[g]), .fetch_instr (fetch_instr[g]),
      .fetch_pred (fetch_pred[g]), .res (res[g]),
      .n_instr (n_instr[g]), .n_err (n_err[g]), .n_line_change (n_lc[g]), .n_wrong_path (n_wp[g]));

    always @(posedge clk) begin
      if (!rst_n) begin
        n_omit[g] <= 0; n_miss[g] <= 0; n_repl[g] <= 0; n_redir[g] <= 0;
      end else begin
        if (stats[g].access && !stats[g].tag_cmp) n_omit[g] <= n_omit[g] + 1;
        if (stats[g].miss)        n_miss[g]  <= n_miss[g] + 1;
        if (stats[g].btb_replace) n_repl[g]  <= n_repl[g] + 1;
        if (stats[g].redirect)    n_redir[g] <= n_redir[g] + 1;
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
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (CYCLES) @(posedge clk);
    #1;
    for (int g = 0; g < NSYS; g++) begin
      $display("program %0d INTERLINE=%0d delay %0d: instructions %0d, wrong-path %0d, omitted comparisons %0d, misses %0d, BTB replacements %0d, redirects %0d",
               1 + g / 4, g % 2, (g / 2) % 2 == 1 ? LONG_DELAY : 1, n_instr[g], n_wp[g], n_omit[g], n_miss[g], n_repl[g], n_redir[g]);
      if ((g / 2) % 2 == 1) check(n_wp[g] > 0, $sformatf("wrong-path instructions delivered (system %0d)", g));
      check(n_err[g] == 0, $sformatf("instruction stream correct (system %0d)", g));
      check(n_instr[g] > CYCLES / 4, $sformatf("progress (system %0d)", g));
      check(n_omit[g] > 0, $sformatf("comparisons omitted (system %0d)", g));
      check(n_miss[g] > 0 && n_repl[g] > 0 && n_redir[g] > 0,
            $sformatf("misses, replacements and redirects seen (system %0d)", g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
