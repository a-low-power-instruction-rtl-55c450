// tb_hbtc_replace: directed test of the rule that a BTB replacement erases
// all footprints. Runs the replacement program of hbtc_tb_prog_pkg on the
// front end at default sizes: every loop pass evicts branch B from the BTB,
// so the loop-back footprint on A would, if kept, let the fall-through into F
// skip its tag compare while F's second line has been replaced by Z. The core
// model checks every instruction; the testbench also checks that F was
// entered with TCO=0 each time, that F's second line missed each time, and
// that replacements, misses and RCT-based omissions all happened.
module tb_hbtc_replace;
  import hbtc_pkg::*;

  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LAT        = 5;
  localparam int unsigned CYCLES     = 20000;

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
  int unsigned n_req, n_instr, n_err, n_lc;
  int checks = 0, failures = 0;

  hbtc_frontend dut (.*);
  hbtc_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(LAT), .PROG(-1)) mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .resp_valid(mem_resp_valid),
    .resp_data(mem_resp_data), .n_req(n_req));
  hbtc_tb_core #(.PROG(-1)) core (
    .clk, .rst_n, .fetch_valid, .fetch_pc, .fetch_instr, .fetch_pred, .res,
    .n_instr, .n_err, .n_line_change(n_lc), .n_wrong_path());

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned n_f = 0, n_f_miss = 0, n_repl = 0, n_rct = 0, n_omit = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (fetch_valid && fetch_pc == 32'h4014) begin
        n_f++;
        checks++;
        if (tco) begin
          failures++;
          $display("FAIL fall-through entered with TCO=1 at %0t", $time);
        end
      end
      if (stats.miss && fetch_pc == 32'h4020) n_f_miss++;
      if (stats.btb_replace)  n_repl++;
      if (stats.tco_from_rct) n_rct++;
      if (stats.access && tco) n_omit++;
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
    $display("instructions %0d, fall-throughs into F %0d (F line missed %0d), replacements %0d, TCO<-RCT %0d, omitted %0d",
             n_instr, n_f, n_f_miss, n_repl, n_rct, n_omit);
    check(n_err == 0, "instruction stream correct");
    check(n_f > 10, "fall-through path exercised");
    check(n_f_miss == n_f, "the replaced line of F missed on every fall-through");
    check(n_repl > 6 * n_f, "chain replacements every pass");
    check(n_rct > 0 && n_omit > 0, "footprints still used within a pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
