// hbtc_tb_core: behavioural stand-in for the processor core. It executes a
// program of hbtc_tb_prog_pkg (PROG selects which) in order: every delivered
// instruction on the correct path must be the one at the architectural PC.
// Each branch is resolved RES_DELAY cycles after delivery and reported on res
// with the prediction record it was fetched with. After a branch whose
// prediction was wrong, the instructions the front end keeps delivering until
// that resolution redirects it are wrong-path: they are counted and dropped.
module hbtc_tb_core #(
  parameter int PROG      = 0,  // 0: loop, k > 0: random program k, -1: replacement, -2: epoch
  parameter int RES_DELAY = 1   // cycles from delivery of a branch to its resolution, at least 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  fetch_valid,
  input  hbtc_pkg::addr_t       fetch_pc,
  input  hbtc_pkg::instr_t      fetch_instr,
  input  hbtc_pkg::pred_info_t  fetch_pred,
  output hbtc_pkg::resolve_t    res,
  output int unsigned           n_instr,
  output int unsigned           n_err,
  output int unsigned           n_line_change,  // delivered fetches that left the previous line
  output int unsigned           n_wrong_path    // delivered wrong-path instructions dropped
);
  import hbtc_pkg::*;

  typedef struct {
    resolve_t    r;
    logic        mis;
    longint      due;
  } pend_t;

  pend_t       q [$];
  longint      cyc;
  addr_t       exp_pc;
  addr_t       last_line;
  logic        last_ok;
  logic        wrong_path;
  int unsigned exec_cnt [addr_t];
  logic        res_mis;   // the resolution being driven is a misprediction

  always @(posedge clk) begin
    if (!rst_n) begin
      res           <= '0;
      res_mis       <= 1'b0;
      exp_pc        <= '0;
      n_instr       <= 0;
      n_err         <= 0;
      n_line_change <= 0;
      n_wrong_path  <= 0;
      last_ok       <= 1'b0;
      last_line     <= '0;
      wrong_path    <= 1'b0;
      cyc           <= 0;
      q.delete();
    end else begin
      logic wp;
      cyc <= cyc + 1;
      // the misprediction resolved in this cycle redirects the front end
      wp = wrong_path && !(res.valid && res_mis);
      if (fetch_valid && wp) begin
        n_wrong_path <= n_wrong_path + 1;
      end else if (fetch_valid) begin
        logic [31:0] w;
        logic [3:0]  op;
        w  = hbtc_tb_prog_pkg::word(PROG, fetch_pc);
        op = w[31:28];
        n_instr <= n_instr + 1;
        if (fetch_pc !== exp_pc || fetch_instr !== w) begin
          n_err <= n_err + 1;
          if (n_err < 10) $display("core: pc %h instr %h, expected pc %h instr %h", fetch_pc, fetch_instr, exp_pc, w);
        end
        if (!last_ok || last_line != {fetch_pc[31:5], 5'b0}) n_line_change <= n_line_change + 1;
        last_ok   <= 1'b1;
        last_line <= {fetch_pc[31:5], 5'b0};
        if (op == hbtc_tb_prog_pkg::OP_LOOP || op == hbtc_tb_prog_pkg::OP_EXIT ||
            op == hbtc_tb_prog_pkg::OP_JUMP) begin
          int unsigned t, n;
          logic        taken;
          addr_t       tgt, nxt;
          pend_t       p;
          t = int'(w[27:16]);
          n = exec_cnt.exists(fetch_pc) ? exec_cnt[fetch_pc] : 0;
          exec_cnt[fetch_pc] = n + 1;
          case (op)
            hbtc_tb_prog_pkg::OP_LOOP: taken = (n % t) != t - 1;
            hbtc_tb_prog_pkg::OP_EXIT: taken = (n % t) == t - 1;
            default:                   taken = 1'b1;
          endcase
          tgt = hbtc_tb_prog_pkg::branch_target(fetch_pc, w);
          nxt = taken ? tgt : fetch_pc + 32'd4;
          p.r.valid  = 1'b1;
          p.r.pc     = fetch_pc;
          p.r.taken  = taken;
          p.r.target = tgt;
          p.r.pred   = fetch_pred;
          p.mis      = nxt != fetch_pred.next_pc;
          p.due      = cyc + longint'(RES_DELAY);
          q.push_back(p);
          exp_pc <= nxt;
          if (p.mis) wp = 1'b1;
        end else begin
          exp_pc <= fetch_pc + 32'd4;
        end
      end
      wrong_path <= wp;
      // drive the resolution that falls due in the next cycle
      if (q.size() > 0 && q[0].due <= cyc + 1) begin
        pend_t p;
        p = q.pop_front();
        res     <= p.r;
        res_mis <= p.mis;
      end else begin
        res.valid <= 1'b0;
        res_mis   <= 1'b0;
      end
    end
  end
endmodule
