// sed_classifier: SED classification module.
//
// Receives the four corner samples of one block and the threshold for its
// size. Six S-COREs (sed_score) evaluate every pair of corners; their
// decisions are combined by two 3-input OR gates and a final 2-input OR, so
// the block is classed as an edge (DECISION = 1) as soon as any pair of
// corners differs by more than the threshold, and as homogeneous (0)
// otherwise. Six cores, all pairs and the OR tree follow the published
// classification module; which corner is A, B, C or D and which pairs feed
// which OR gate are this design's choice (the result does not depend on it).
// Purely combinational.
module sed_classifier #(
  parameter int unsigned W     = 8,
  parameter int unsigned THR_W = 8
) (
  input  logic [W-1:0]     border_a,   // top-left corner
  input  logic [W-1:0]     border_b,   // top-right corner
  input  logic [W-1:0]     border_c,   // bottom-left corner
  input  logic [W-1:0]     border_d,   // bottom-right corner
  input  logic [THR_W-1:0] threshold,
  output logic             decision    // 1 = edge, 0 = homogeneous
);

  logic [5:0] core_dec;

  sed_score #(.W(W), .THR_W(THR_W)) u_core_ab (.border_1(border_a), .border_2(border_b), .threshold(threshold), .decision(core_dec[0]));
  sed_score #(.W(W), .THR_W(THR_W)) u_core_ac (.border_1(border_a), .border_2(border_c), .threshold(threshold), .decision(core_dec[1]));
  sed_score #(.W(W), .THR_W(THR_W)) u_core_ad (.border_1(border_a), .border_2(border_d), .threshold(threshold), .decision(core_dec[2]));
  sed_score #(.W(W), .THR_W(THR_W)) u_core_bc (.border_1(border_b), .border_2(border_c), .threshold(threshold), .decision(core_dec[3]));
  sed_score #(.W(W), .THR_W(THR_W)) u_core_bd (.border_1(border_b), .border_2(border_d), .threshold(threshold), .decision(core_dec[4]));
  sed_score #(.W(W), .THR_W(THR_W)) u_core_cd (.border_1(border_c), .border_2(border_d), .threshold(threshold), .decision(core_dec[5]));

  logic or_upper, or_lower;

  always_comb begin
    or_upper = core_dec[0] | core_dec[1] | core_dec[2];
    or_lower = core_dec[3] | core_dec[4] | core_dec[5];
    decision = or_upper | or_lower;
  end

endmodule
