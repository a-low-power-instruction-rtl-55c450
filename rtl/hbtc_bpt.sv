// hbtc_bpt: direct-mapped branch prediction table (BPT).
//
// Supplies the "prediction result" that selects, on a BTB hit, between the
// branch target and the incremented PC and between the RCT and RCN footprints.
// The evaluated configuration gives only the table size (2048 direct-mapped
// entries); the entry format is this design's choice: a 2-bit saturating
// counter per entry (predict taken when the counter is 2 or 3), indexed by
// the instruction-word address bits above the byte offset.
//
// Interface: lookup is combinational (lk_pc -> lk_taken). The update port
// trains the counter of up_pc with the resolved direction at the rising clock
// edge. Reset (active-low, synchronous to clk) sets every counter to 1,
// weakly not-taken.
module hbtc_bpt #(
  parameter int unsigned ENTRIES = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  input  hbtc_pkg::addr_t    lk_pc,
  output logic               lk_taken,
  input  logic               up_valid,
  input  hbtc_pkg::addr_t    up_pc,
  input  logic               up_taken
);
  import hbtc_pkg::*;

  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0] ctr [ENTRIES];

  logic [IW-1:0] lk_idx, up_idx;
  assign lk_idx   = lk_pc[IW+1:2];
  assign up_idx   = up_pc[IW+1:2];
  assign lk_taken = ctr[lk_idx][1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'd1;
    end else if (up_valid) begin
      if (up_taken && ctr[up_idx] != 2'd3)       ctr[up_idx] <= ctr[up_idx] + 2'd1;
      else if (!up_taken && ctr[up_idx] != 2'd0) ctr[up_idx] <= ctr[up_idx] - 2'd1;
    end
  end

endmodule
