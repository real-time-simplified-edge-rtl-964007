// sed_threshold_table: SED threshold table.
//
// Delivers one threshold per block size (4x4, 8x8, 16x16, 32x32) to the
// classification modules, chosen by the resolution class of the frame being
// coded. A table indexed by block size and resolution follows the published
// architecture; the two resolution classes and the threshold values are this
// design's own choice and are set through the THRESHOLDS parameter
// (index [resolution][level]). Purely combinational: the resolution input is
// expected to be held stable for the whole block (sed_controller latches it).
module sed_threshold_table
  import sed_pkg::*;
#(
  parameter thr_table_t THRESHOLDS = DEFAULT_THRESHOLDS
) (
  input  resolution_e res_sel,
  output thr_set_t    thr        // thr[level], level 0 = 4x4 ... 3 = 32x32
);

  always_comb begin
    thr = THRESHOLDS[res_sel];
  end

endmodule
