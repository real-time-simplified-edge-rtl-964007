// sed_pkg: constants and types shared by the Simplified Edge Detector (SED)
// blocks.
//
// The SED hardware classifies every square sub-block of a 32x32 depth-map
// block (64 of 4x4, 16 of 8x8, 4 of 16x16 and the 32x32 block itself) as
// homogeneous or edge from its four corner samples. The block edge, the
// 8-bit sample width, the one-row-per-cycle input (32 samples) and the four
// block sizes follow the published architecture. The threshold width, the
// two resolution classes and their encoding are choices of this design.
package sed_pkg;

  // Block geometry (fixed by the architecture).
  localparam int unsigned CTU      = 32;            // largest block edge, in samples
  localparam int unsigned MIN_BS   = 4;             // smallest block edge
  localparam int unsigned N_LEVELS = 4;             // 4x4, 8x8, 16x16, 32x32
  localparam int unsigned ROW_W    = $clog2(CTU);   // row index width
  localparam int unsigned SAMPLE_W = 8;             // depth sample width
  localparam int unsigned THR_W    = 8;             // threshold width (own choice)

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef sample_t [CTU-1:0]   row_t;               // one row of the block, column 0 at index 0
  typedef logic [ROW_W-1:0]    row_idx_t;
  typedef logic [THR_W-1:0]    thr_t;

  // Frame resolution classes seen by the threshold table (own choice: the two
  // frame sizes of the common 3D-HEVC test sequences).
  typedef enum logic {
    RES_1024X768  = 1'b0,
    RES_1920X1088 = 1'b1
  } resolution_e;
  localparam int unsigned N_RES = 2;

  // Thresholds, indexed [resolution][level], level 0 = 4x4 ... 3 = 32x32.
  typedef thr_t [N_LEVELS-1:0]          thr_set_t;
  typedef thr_set_t [N_RES-1:0]         thr_table_t;

  // Default table contents (own choice; the values are not published with the
  // architecture). Larger blocks get a larger threshold.
  localparam thr_table_t DEFAULT_THRESHOLDS = '{
    // RES_1920X1088: 32x32, 16x16, 8x8, 4x4
    '{8'd11, 8'd9, 8'd7, 8'd5},
    // RES_1024X768:  32x32, 16x16, 8x8, 4x4
    '{8'd12, 8'd10, 8'd8, 8'd6}
  };

  // Block edge of a level: 4 << level.
  function automatic int unsigned level_bs(input int unsigned level);
    return MIN_BS << level;
  endfunction

endpackage
