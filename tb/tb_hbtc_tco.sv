// tb_hbtc_tco: self-checking testbench of the TCO flag. Directed cases check
// the selection of RCT on predicted-taken and RCN on predicted-not-taken, that
// the flag holds without a load, and that clear wins over load; then random
// stimulus is compared with a one-line reference.
module tb_hbtc_tco;
  logic clk = 1'b0;
  logic rst_n, load, pred_taken, rct, rcn, clear, tco;
  logic exp_tco;
  int   checks = 0, failures = 0;

  hbtc_tco dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic l, logic p, logic t, logic n, logic c, logic e, string what);
    @(negedge clk);
    load = l; pred_taken = p; rct = t; rcn = n; clear = c;
    @(posedge clk);
    #1;
    checks++;
    if (tco !== e) begin
      failures++;
      $display("FAIL %s: tco=%0b exp %0b", what, tco, e);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; pred_taken = 1'b0; rct = 1'b0; rcn = 1'b0; clear = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (tco !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;

    step(1, 1, 1, 0, 0, 1, "taken selects RCT=1");
    step(0, 0, 0, 0, 0, 1, "hold");
    step(1, 0, 1, 0, 0, 0, "not-taken selects RCN=0");
    step(1, 0, 0, 1, 0, 1, "not-taken selects RCN=1");
    step(1, 1, 0, 1, 0, 0, "taken selects RCT=0");
    step(1, 1, 1, 1, 0, 1, "both set");
    step(1, 1, 1, 1, 1, 0, "clear wins over load");
    step(1, 0, 0, 1, 0, 1, "reload");
    step(0, 1, 1, 1, 1, 0, "clear alone");

    exp_tco = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      logic l, p, t, n, c;
      l = 1'($urandom); p = 1'($urandom); t = 1'($urandom); n = 1'($urandom);
      c = ($urandom % 5) == 0;
      if (c) exp_tco = 1'b0;
      else if (l) exp_tco = p ? t : n;
      step(l, p, t, n, c, exp_tco, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
