// sed_score: one SED core (S-CORE).
//
// Takes two corner samples of a block and the threshold for the block size.
// BORDER_1 is subtracted from BORDER_2, the sign of the difference is removed
// (absolute value) and a comparator raises DECISION when the absolute
// difference is strictly greater than THRESHOLD. DECISION = 1 means the block
// holds an edge and the bipartition modes must be evaluated; 0 means the pair
// of samples looks homogeneous. Subtract, absolute value and strict
// comparison follow the published core. Purely combinational; the widths are
// parameters.
module sed_score #(
  parameter int unsigned W     = 8,   // sample width
  parameter int unsigned THR_W = 8    // threshold width
) (
  input  logic [W-1:0]     border_1,
  input  logic [W-1:0]     border_2,
  input  logic [THR_W-1:0] threshold,
  output logic             decision
);

  logic signed [W:0] diff;
  logic [W-1:0]      abs_diff;

  always_comb begin
    diff     = $signed({1'b0, border_2}) - $signed({1'b0, border_1});
    abs_diff = diff[W] ? W'(-diff) : diff[W-1:0];
    decision = 32'(abs_diff) > 32'(threshold);
  end

endmodule
