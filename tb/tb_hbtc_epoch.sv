// tb_hbtc_epoch: directed test of the footprint epoch. Runs the epoch program
// of hbtc_tb_prog_pkg on the front end at default sizes, with a core that
// resolves each branch RES_DELAY cycles after delivery, longer than two
// refills take. The loop branch Y (0x3FFC) is taken to W (0xBFE0); W jumps
// back to 0x3FE0, whose line conflicts with W's. So while Y is still in
// flight, W is filled and then evicted again by the 0x3FE0 refill. When Y
// resolves, its taken footprint must not be set: its prediction record
// carries an older epoch. If it were set, the next fetch of Y would load TCO
// with 1 and W would be read without a tag comparison, delivering the
// 0x3FE0 line's words; the core model checks every correct-path word and
// would report them. The testbench also counts the resolutions whose
// footprint the epoch suppressed and requires them, as well as wrong-path
// fetches, misses and redirects.
// A second front end runs the pending-refill program with RES_DELAY2=8: the
// branch Y resolves while the refill of a line that evicts Y's target line
// is still pending, so its epoch is current and it sets its footprint. That
// footprint must be gone by the next fetch of Y, because the erase comes with
// the write of the line, not with the detection of the miss. The testbench
// requires such sets to happen and checks the instruction stream.
module tb_hbtc_epoch;
  import hbtc_pkg::*;

  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LAT        = 5;
  localparam int          RES_DELAY  = 22;
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
  int unsigned n_req, n_instr, n_err, n_lc, n_wp;
  int checks = 0, failures = 0;

  hbtc_frontend dut (.*);
  hbtc_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(LAT), .PROG(-2)) mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .resp_valid(mem_resp_valid),
    .resp_data(mem_resp_data), .n_req(n_req));
  hbtc_tb_core #(.PROG(-2), .RES_DELAY(RES_DELAY)) core (
    .clk, .rst_n, .fetch_valid, .fetch_pc, .fetch_instr, .fetch_pred, .res,
    .n_instr, .n_err, .n_line_change(n_lc), .n_wrong_path(n_wp));

  // Second system: the pending-refill program with a core that resolves
  // while the refill caused by the following block is still outstanding.
  localparam int RES_DELAY2 = 8;
  logic       fetch_valid2;
  addr_t      fetch_pc2, mem_addr2;
  instr_t     fetch_instr2;
  pred_info_t fetch_pred2;
  resolve_t   res2;
  logic       mem_req2, mem_resp_valid2, tco2;
  logic [LINE_BYTES*8-1:0] mem_resp_data2;
  stats_t     stats2;
  int unsigned n_req2, n_instr2, n_err2, n_lc2, n_wp2;

  hbtc_frontend dut2 (
    .clk, .rst_n, .fetch_valid(fetch_valid2), .fetch_pc(fetch_pc2),
    .fetch_instr(fetch_instr2), .fetch_pred(fetch_pred2), .res(res2),
    .mem_req(mem_req2), .mem_addr(mem_addr2), .mem_resp_valid(mem_resp_valid2),
    .mem_resp_data(mem_resp_data2), .tco(tco2), .stats(stats2));
  hbtc_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(LAT), .PROG(-3)) mem2 (
    .clk, .rst_n, .req(mem_req2), .addr(mem_addr2), .resp_valid(mem_resp_valid2),
    .resp_data(mem_resp_data2), .n_req(n_req2));
  hbtc_tb_core #(.PROG(-3), .RES_DELAY(RES_DELAY2)) core2 (
    .clk, .rst_n, .fetch_valid(fetch_valid2), .fetch_pc(fetch_pc2),
    .fetch_instr(fetch_instr2), .fetch_pred(fetch_pred2), .res(res2),
    .n_instr(n_instr2), .n_err(n_err2), .n_line_change(n_lc2), .n_wrong_path(n_wp2));

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned n_stale_epoch = 0, n_miss = 0, n_omit = 0, n_redir = 0;
  int unsigned n_set_pending = 0, n_omit2 = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (res.valid && !stats.redirect && res.pred.epoch != dut.epoch) n_stale_epoch++;
      if (stats.miss)            n_miss++;
      if (stats.redirect)        n_redir++;
      if (stats.access && tco)   n_omit++;
      // correct prediction resolved with an unchanged epoch during a refill
      if (res2.valid && !stats2.redirect && res2.pred.epoch == dut2.epoch && mem_req2)
        n_set_pending++;
      if (stats2.access && tco2) n_omit2++;
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
    $display("instructions %0d, wrong-path %0d, misses %0d, redirects %0d, footprints suppressed by epoch %0d, omitted %0d",
             n_instr, n_wp, n_miss, n_redir, n_stale_epoch, n_omit);
    check(n_err == 0, "instruction stream correct");
    check(n_instr > 1000, "progress");
    check(n_wp > 0, "wrong-path fetches delivered");
    check(n_stale_epoch > 0, "a footprint was suppressed by the epoch");
    check(n_miss > 0 && n_redir > 0, "misses and redirects");
    $display("pending-refill system: instructions %0d, footprints set during a refill %0d, omitted %0d",
             n_instr2, n_set_pending, n_omit2);
    check(n_err2 == 0, "pending-refill system: instruction stream correct");
    check(n_instr2 > 1000, "pending-refill system: progress");
    check(n_set_pending > 0, "pending-refill system: footprint set while a refill was pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
