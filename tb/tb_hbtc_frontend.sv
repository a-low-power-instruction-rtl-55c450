// tb_hbtc_frontend: end-to-end testbench of the H-TC fetch front end at its
// default sizes (32 KB cache, 32-byte lines, 512x4 BTB, 2048-entry BPT).
//
// A small core model executes the test program of hbtc_tb_prog_pkg: it checks
// that every delivered instruction is the one at the architectural PC (so a
// tag comparison wrongly omitted on a replaced line, or a wrong-path
// instruction leaking out, is caught), resolves each branch one cycle after
// delivery and returns the outcome to the front end. A memory model answers
// refills after LAT cycles.
//
// It also checks that fetch delivers one instruction per cycle except while a
// miss is pending or in the cycle of a redirect, that tag comparisons were
// omitted for a good share of the accesses, and that every mechanism
// happened: comparison omitted, TCO loaded from RCT and from RCN, cache miss
// with footprint erase, BTB replacement with footprint erase, misprediction
// redirect, and a redirect arriving while a refill is pending.
module tb_hbtc_frontend;
  import hbtc_pkg::*;

  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LAT        = 6;
  localparam int unsigned CYCLES     = 40000;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       fetch_valid;
  addr_t      fetch_pc, mem_addr;
  instr_t     fetch_instr;
  pred_info_t fetch_pred;
  resolve_t   res;
  logic       mem_req, mem_resp_valid, tco;
  logic [LINE_BYTES*8-1:0] mem_resp_data;
  stats_t     stats;
  int unsigned n_req;

  int checks = 0, failures = 0;

  hbtc_frontend dut (.*);

  hbtc_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(LAT)) mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .resp_valid(mem_resp_valid),
    .resp_data(mem_resp_data), .n_req(n_req));

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t %s", $time, msg);
  endtask

  // ------------------------------------------------------------ core model
  addr_t       exp_pc;
  int unsigned exec_cnt [addr_t];
  int unsigned n_instr = 0, n_branch = 0, n_omit = 0, n_cmp = 0, n_miss = 0,
               n_fill = 0, n_repl = 0, n_redir = 0, n_rct = 0, n_rcn = 0,
               n_redir_busy = 0, n_idle = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      res    <= '0;
      exp_pc <= '0;
    end else begin
      res.valid <= 1'b0;
      if (fetch_valid) begin
        logic [31:0] w;
        logic [3:0]  op;
        w  = hbtc_tb_prog_pkg::prog_word(fetch_pc);
        op = w[31:28];
        n_instr++;
        checks++;
        if (fetch_pc !== exp_pc) fail($sformatf("fetched pc %h, expected %h", fetch_pc, exp_pc));
        checks++;
        if (fetch_instr !== w) fail($sformatf("pc %h: instr %h, expected %h (tco=%0b)", fetch_pc, fetch_instr, w, tco));
        if (op == hbtc_tb_prog_pkg::OP_LOOP || op == hbtc_tb_prog_pkg::OP_EXIT ||
            op == hbtc_tb_prog_pkg::OP_JUMP) begin
          int unsigned t, n;
          logic        taken;
          addr_t       tgt;
          t = int'(w[27:16]);
          n = exec_cnt.exists(fetch_pc) ? exec_cnt[fetch_pc] : 0;
          exec_cnt[fetch_pc] = n + 1;
          case (op)
            hbtc_tb_prog_pkg::OP_LOOP: taken = (n % t) != t - 1;
            hbtc_tb_prog_pkg::OP_EXIT: taken = (n % t) == t - 1;
            default:                   taken = 1'b1;
          endcase
          tgt = hbtc_tb_prog_pkg::branch_target(fetch_pc, w);
          res.valid  <= 1'b1;
          res.pc     <= fetch_pc;
          res.taken  <= taken;
          res.target <= tgt;
          res.pred   <= fetch_pred;
          exp_pc     <= taken ? tgt : fetch_pc + 32'd4;
          n_branch++;
        end else begin
          exp_pc <= fetch_pc + 32'd4;
        end
      end
    end
  end

  // ------------------------------------------------------------ statistics
  always @(posedge clk) begin
    if (rst_n) begin
      if (stats.access && tco) n_omit++;
      if (stats.tag_cmp)       n_cmp++;
      if (stats.miss)          n_miss++;
      if (stats.fill)          n_fill++;
      if (stats.btb_replace)   n_repl++;
      if (stats.redirect)      n_redir++;
      if (stats.redirect && (mem_req || stats.miss)) n_redir_busy++;
      if (stats.tco_from_rct)  n_rct++;
      if (stats.tco_from_rcn)  n_rcn++;
      // throughput: one instruction per cycle unless a miss or redirect intervenes
      if (!stats.access) begin
        n_idle++;
        checks++;
        if (!(stats.miss || mem_req || stats.redirect)) fail("fetch bubble without miss or redirect");
      end
    end
  end

  task automatic need(int unsigned n, string what);
    checks++;
    if (n == 0) fail($sformatf("mechanism never happened: %s", what));
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (CYCLES) @(posedge clk);
    #1;
    $display("instructions %0d, branches %0d, tag comparisons %0d, omitted %0d (%0d%%)",
             n_instr, n_branch, n_cmp, n_omit, (100 * n_omit) / (n_instr == 0 ? 1 : n_instr));
    $display("misses %0d, fills %0d, BTB replacements %0d, redirects %0d (%0d during refill), TCO<-RCT %0d, TCO<-RCN %0d",
             n_miss, n_fill, n_repl, n_redir, n_redir_busy, n_rct, n_rcn);
    need(n_omit,       "tag comparison omitted");
    need(n_rct,        "TCO loaded from RCT");
    need(n_rcn,        "TCO loaded from RCN");
    need(n_miss,       "cache miss");
    need(n_fill,       "line fill erasing footprints");
    need(n_repl,       "BTB replacement erasing footprints");
    need(n_redir,      "misprediction redirect");
    need(n_redir_busy, "redirect while a wrong-path miss is being served");
    checks++;
    if (n_fill != n_req) fail("fills and memory requests differ");
    checks++;
    if (n_instr < CYCLES / 2) fail($sformatf("only %0d instructions in %0d cycles", n_instr, CYCLES));
    // the loop-heavy program must skip most comparisons
    checks++;
    if (n_omit * 2 < n_instr) fail("fewer than half of the tag comparisons omitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
