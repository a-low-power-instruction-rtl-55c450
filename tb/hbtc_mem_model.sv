// hbtc_mem_model: behavioural model of the memory below the instruction cache.
// It watches the cache's refill request, waits LAT cycles from the first cycle
// the request is seen, then returns the whole line for one cycle. Contents come
// from hbtc_tb_prog_pkg (PROG selects the program).
module hbtc_mem_model #(
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned LAT        = 4,
  parameter int          PROG       = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req,
  input  logic [31:0]             addr,
  output logic                    resp_valid,
  output logic [LINE_BYTES*8-1:0] resp_data,
  output int unsigned             n_req
);
  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_RESP} mstate_e;
  mstate_e     st;
  int unsigned cnt;
  logic [31:0] a_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= M_IDLE;
      cnt   <= 0;
      a_q   <= '0;
      n_req <= 0;
    end else begin
      case (st)
        M_IDLE: if (req) begin
          st    <= (LAT <= 1) ? M_RESP : M_WAIT;
          cnt   <= LAT - 2;
          a_q   <= addr;
          n_req <= n_req + 1;
        end
        M_WAIT: if (cnt == 0) st <= M_RESP; else cnt <= cnt - 1;
        default: st <= M_IDLE;
      endcase
    end
  end

  assign resp_valid = (st == M_RESP);
  always_comb begin
    for (int i = 0; i < LINE_BYTES / 4; i++)
      resp_data[32*i +: 32] = hbtc_tb_prog_pkg::word(PROG, a_q + 32'(4 * i));
  end
endmodule
