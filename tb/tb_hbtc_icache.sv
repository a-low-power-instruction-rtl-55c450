// tb_hbtc_icache: self-checking testbench of the direct-mapped instruction
// cache with tag-comparison enable.
// Two caches see the same accesses: dut (interline omission off, the main
// configuration) and dut_il (INTERLINE=1), each with its own memory model of
// latency LAT. The reference tracks which line each index holds. Checks:
//   * hit/miss outcome and returned instruction against the reference;
//   * the miss penalty: data is delivered exactly LAT+2 cycles after the
//     cycle in which the miss was detected;
//   * with tag_cmp_en=0 the cache does not look at the tag: after a
//     conflicting line replaced the indexed line, an omitted comparison
//     returns that other line's word, and no tag_cmp strobe is given;
//   * dut_il compares tags only when the access leaves the line of the
//     previous delivered access or a fill happened since.
module tb_hbtc_icache;
  import hbtc_pkg::*;

  localparam int unsigned CACHE_BYTES = 32768;
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned LINES       = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned LAT         = 4;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  req_valid, tag_cmp_en;
  addr_t req_addr;

  logic   resp_valid, tag_cmp, miss, fill, busy, mem_req, mem_resp_valid;
  instr_t resp_instr;
  addr_t  mem_addr;
  logic [LINE_BYTES*8-1:0] mem_resp_data;
  int unsigned n_req;

  logic   il_resp_valid, il_tag_cmp, il_miss, il_fill, il_busy, il_mem_req, il_mem_resp_valid;
  instr_t il_resp_instr;
  addr_t  il_mem_addr;
  logic [LINE_BYTES*8-1:0] il_mem_resp_data;
  int unsigned il_n_req;

  int checks = 0, failures = 0;

  hbtc_icache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .INTERLINE(1'b0)) dut (
    .clk, .rst_n, .req_valid, .req_addr, .tag_cmp_en,
    .resp_valid, .resp_instr, .tag_cmp, .miss, .fill, .busy,
    .mem_req, .mem_addr, .mem_resp_valid, .mem_resp_data);
  hbtc_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(LAT)) mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .resp_valid(mem_resp_valid),
    .resp_data(mem_resp_data), .n_req(n_req));

  hbtc_icache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .INTERLINE(1'b1)) dut_il (
    .clk, .rst_n, .req_valid, .req_addr, .tag_cmp_en,
    .resp_valid(il_resp_valid), .resp_instr(il_resp_instr), .tag_cmp(il_tag_cmp),
    .miss(il_miss), .fill(il_fill), .busy(il_busy),
    .mem_req(il_mem_req), .mem_addr(il_mem_addr), .mem_resp_valid(il_mem_resp_valid),
    .mem_resp_data(il_mem_resp_data));
  hbtc_mem_model #(.LINE_BYTES(LINE_BYTES), .LAT(LAT)) mem_il (
    .clk, .rst_n, .req(il_mem_req), .addr(il_mem_addr), .resp_valid(il_mem_resp_valid),
    .resp_data(il_mem_resp_data), .n_req(il_n_req));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic        ref_valid [LINES];
  logic [31:0] ref_line  [LINES];   // line address held at each index
  logic        il_last_valid;
  logic [31:0] il_last_line;
  int          n_cmp = 0, n_il_cmp = 0, n_omit_stale = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // One access: present it, wait for delivery, check everything.
  task automatic access(addr_t a, logic en);
    int unsigned i      = int'(a[14:5]);
    logic [31:0] ln     = {a[31:5], 5'b0};
    logic        exp_il_cmp;
    logic        expect_miss;
    int          cyc = 0;
    logic [31:0] exp_word;

    expect_miss = en && !(ref_valid[i] && ref_line[i] == ln);
    exp_il_cmp  = en && !(il_last_valid && il_last_line == ln);
    @(negedge clk);
    req_valid = 1'b1; req_addr = a; tag_cmp_en = en;
    #1;
    checks++;
    if (tag_cmp !== en) fail($sformatf("tag_cmp strobe %0b for en=%0b", tag_cmp, en));
    if (tag_cmp) n_cmp++;
    checks++;
    if (il_tag_cmp !== exp_il_cmp) fail($sformatf("interline tag_cmp %0b exp %0b at %h", il_tag_cmp, exp_il_cmp, a));
    if (il_tag_cmp) n_il_cmp++;
    checks++;
    if (miss !== expect_miss) fail($sformatf("miss=%0b exp %0b at %h", miss, expect_miss, a));
    while (!resp_valid) begin
      @(posedge clk);
      #1;
      cyc++;
      if (cyc > 100) begin fail("no delivery"); break; end
    end
    if (expect_miss) begin
      checks++;
      if (cyc != LAT + 2) fail($sformatf("miss penalty %0d cycles, exp %0d", cyc, LAT + 2));
      ref_valid[i] = 1'b1;
      ref_line[i]  = ln;
      il_last_valid = 1'b0;
    end
    // without a comparison the indexed line is returned, whatever it holds
    exp_word = hbtc_tb_prog_pkg::prog_word({ref_line[i][31:5], a[4:0]});
    if (!en && ref_line[i] != ln) n_omit_stale++;
    checks++;
    if (resp_instr !== exp_word) fail($sformatf("data %h exp %h at %h", resp_instr, exp_word, a));
    checks++;
    if (il_resp_valid !== 1'b1 || il_resp_instr !== resp_instr) fail("interline cache differs");
    il_last_valid = 1'b1;
    il_last_line  = ln;
    @(posedge clk);
    #1 req_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req_addr = '0; tag_cmp_en = 1'b1;
    for (int k = 0; k < LINES; k++) begin ref_valid[k] = 1'b0; ref_line[k] = '0; end
    il_last_valid = 1'b0; il_last_line = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // cold miss, then the rest of the line hits
    access(32'h0000_0000, 1'b1);
    for (int k = 1; k < 8; k++) access(32'(4 * k), 1'b1);
    // conflicting line replaces it
    access(32'h0000_8004, 1'b1);
    // omitted comparison: no miss, the 0x8000 line's word comes back
    access(32'h0000_0004, 1'b0);
    checks++;
    if (n_omit_stale != 1) fail("stale read not observed");
    // with comparison it misses and refetches (after leaving the line, so that
    // the interline cache compares as well)
    access(32'h0000_0040, 1'b1);
    access(32'h0000_0004, 1'b1);
    access(32'h0000_0008, 1'b0);

    // random accesses over a few conflicting regions
    for (int n = 0; n < 4000; n++) begin
      addr_t a;
      a = {17'($urandom % 3), 3'b000, 10'($urandom % 24), 2'b00};
      if (n % 2 == 1) a = req_addr + 32'd4;        // plenty of sequential accesses
      // the front end clears the enable only for lines it knows are resident
      access(a, ($urandom % 4) != 0 || !(ref_valid[a[14:5]] && ref_line[a[14:5]] == {a[31:5], 5'b0}));
    end

    checks++;
    if (n_req != il_n_req) fail("caches refilled different numbers of lines");
    checks++;
    if (n_il_cmp >= n_cmp) fail("interline omission never saved a comparison");
    $display("tag comparisons: plain %0d, interline %0d, refills %0d, stale omitted reads %0d",
             n_cmp, n_il_cmp, n_req, n_omit_stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
