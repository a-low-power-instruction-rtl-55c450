// hbtc_icache: direct-mapped instruction cache with a tag-comparison enable.
//
// An ordinary direct-mapped cache (32 KB with 32-byte lines in the evaluated
// configuration) reads the tag array and compares the tag on every access.
// Here the comparison is performed only when tag_cmp_en is 1. When it is 0 the
// front end has proven, from the execution footprints, that the addressed
// line is resident, so the tag array is not read at all and the access is
// treated as a hit. The tag_cmp strobe marks every access that did read and
// compare a tag, which is where the energy saving shows.
//
// The data array is split into word-wide subbanks, one per instruction slot
// of a line, and only the subbank of the addressed word is read, so that the
// tag array is the part whose access the footprints remove.
//
// Optional interline omission (INTERLINE=1, default 0): the comparison is
// also skipped when the access falls in the same line as the previous
// delivered access and no fill happened since. This is the combination with
// the interline scheme that the method was evaluated against; the main
// configuration has it off.
//
// Timing: an access is presented with req_valid/req_addr and answered in the
// same cycle (resp_valid, resp_instr) on a hit. On a miss the cache raises
// miss for one cycle, enters REFILL, holds mem_req with the line address
// until the next level returns the whole line with mem_resp_valid, writes
// tag, valid bit and data, pulses fill, and returns to IDLE; the requester
// simply presents its address again. The miss/refill protocol, the single
// beat line transfer and the same-cycle read are choices of this design.
// Active-low synchronous reset invalidates every line.
module hbtc_icache #(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned LINE_BYTES  = 32,
  parameter bit          INTERLINE   = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // fetch side
  input  logic                      req_valid,
  input  hbtc_pkg::addr_t           req_addr,
  input  logic                      tag_cmp_en,   // 0: trust residency, skip the tag
  output logic                      resp_valid,
  output hbtc_pkg::instr_t          resp_instr,
  output logic                      tag_cmp,      // tag array read and compared
  output logic                      miss,         // miss detected this cycle
  output logic                      fill,         // line written this cycle
  output logic                      busy,         // refill in progress
  // next memory level
  output logic                      mem_req,
  output hbtc_pkg::addr_t           mem_addr,
  input  logic                      mem_resp_valid,
  input  logic [LINE_BYTES*8-1:0]   mem_resp_data
);
  import hbtc_pkg::*;

  localparam int unsigned LINES = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned OW    = $clog2(LINE_BYTES);
  localparam int unsigned IW    = $clog2(LINES);
  localparam int unsigned TW    = XLEN - IW - OW;
  localparam int unsigned WPL   = LINE_BYTES / INSTR_BYTES;
  localparam int unsigned WSW   = (WPL > 1) ? $clog2(WPL) : 1;

  typedef enum logic {IDLE, REFILL} state_e;

  logic [TW-1:0]           tag_mem  [LINES];
  logic [LINES-1:0]        valid;

  state_e          state;
  logic [XLEN-OW-1:0] miss_line;   // line address being refilled
  logic            il_valid;
  logic [XLEN-OW-1:0] il_line;     // line of the previous delivered access

  logic [IW-1:0]   idx;
  logic [TW-1:0]   tag;
  logic [WSW-1:0]  word;
  logic [XLEN-OW-1:0] line;
  logic            do_cmp, hit;
  logic [TW-1:0]   tag_rd;

  assign line = req_addr[XLEN-1:OW];
  assign idx  = req_addr[OW+IW-1:OW];
  assign tag  = req_addr[XLEN-1:OW+IW];
  assign word = WSW'(req_addr[OW-1:2]);

  always_comb begin
    do_cmp = tag_cmp_en && !(INTERLINE && il_valid && il_line == line);
    // the tag array is only read when the comparison is performed
    tag_rd = do_cmp ? tag_mem[idx] : '0;
    hit    = !do_cmp || (valid[idx] && tag_rd == tag);
  end

  assign resp_valid = req_valid && state == IDLE && hit;
  // word-wide data subbanks: only the subbank holding the addressed word is
  // read; a fill writes all of them
  instr_t bank_rd [WPL];

  for (genvar b = 0; b < WPL; b++) begin : g_bank
    instr_t bank_mem [LINES];

    always_ff @(posedge clk) begin
      if (fill) bank_mem[miss_line[IW-1:0]] <= mem_resp_data[32*b +: 32];
    end

    assign bank_rd[b] = (word == WSW'(b)) ? bank_mem[idx] : '0;
  end

  assign resp_instr = bank_rd[word];
  assign tag_cmp    = req_valid && state == IDLE && do_cmp;
  assign miss       = req_valid && state == IDLE && !hit;
  assign fill       = state == REFILL && mem_resp_valid;
  assign busy       = state == REFILL;
  assign mem_req    = state == REFILL;
  assign mem_addr   = {miss_line, {OW{1'b0}}};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      valid     <= '0;
      il_valid  <= 1'b0;
      il_line   <= '0;
      miss_line <= '0;
    end else begin
      case (state)
        IDLE: begin
          if (miss) begin
            state     <= REFILL;
            miss_line <= line;
          end
          if (resp_valid) begin
            il_valid <= 1'b1;
            il_line  <= line;
          end
        end
        REFILL: begin
          if (mem_resp_valid) begin
            state                      <= IDLE;
            valid[miss_line[IW-1:0]]   <= 1'b1;
            il_valid                   <= 1'b0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // tag array, no reset
  always_ff @(posedge clk) begin
    if (fill) begin
      tag_mem [miss_line[IW-1:0]] <= miss_line[XLEN-OW-1:IW];
    end
  end

  // the next level answers only while a refill is outstanding
  a_resp_in_refill: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> state == REFILL);

endmodule
