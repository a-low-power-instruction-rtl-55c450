// hbtc_tco: the Tag-Comparison-Omit (TCO) flag.
//
// On every BTB hit of a fetched instruction the footprint of the predicted
// direction is copied into TCO: the RCT flag when the branch is predicted
// taken, the RCN flag when it is predicted not-taken. While TCO is 1 the
// instruction cache skips its tag comparison. TCO is reset on a cache miss
// (line fill) and on a BTB replacement, both as the method prescribes; this
// design also resets it on a branch misprediction, because the instructions
// that follow a redirect do not belong to the segment the footprint vouched
// for. Reset wins over load in the same cycle.
//
// Interface: load/pred_taken/rct/rcn and clear are sampled at the rising
// clock edge; tco is the registered flag. Active-low synchronous reset
// clears the flag, so the first fetches always compare tags.
module hbtc_tco (
  input  logic clk,
  input  logic rst_n,
  input  logic load,        // BTB hit on an accepted fetch
  input  logic pred_taken,  // prediction result for that fetch
  input  logic rct,         // RCT flag of the hitting entry
  input  logic rcn,         // RCN flag of the hitting entry
  input  logic clear,       // cache fill, BTB replacement or redirect
  output logic tco
);

  always_ff @(posedge clk) begin
    if (!rst_n)     tco <= 1'b0;
    else if (clear) tco <= 1'b0;
    else if (load)  tco <= pred_taken ? rct : rcn;
  end

endmodule
