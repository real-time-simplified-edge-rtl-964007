// sed_top: Simplified Edge Detector (SED) for 3D-HEVC depth-map intra coding.
//
// Classifies every sub-block of a 32x32 depth block as homogeneous (0) or
// edge (1): a block is an edge when any two of its four corner samples differ
// by more than a threshold that depends on the block size and the frame
// resolution. An edge decision tells the encoder to evaluate the bipartition
// (DMM) modes for that block; a homogeneous one lets it skip them.
//
// The block is read from the encoder's shared memory one full 32-sample row
// per cycle (the whole block is read so that the SED can share the memory
// stream with other encoder modules). Four levels, one per block size, work
// side by side:
//   level  size   input regs  classifiers  output regs
//     0    4x4       16            8            64
//     1    8x8        8            4            16
//     2   16x16       4            2             4
//     3   32x32       2            1             1
// When the top row of a band of blocks arrives, each level stores the
// top-left/top-right corners of its blocks (sed_input_regs); when the band's
// bottom row arrives, the bottom corners are taken straight from the row and
// the level's classifiers decide all blocks of the band in that cycle; the
// results are written into the 1-bit output registers (sed_output_regs). The
// threshold table (sed_threshold_table) gives each level its threshold.
// This structure, the register and module counts and the 34-cycle schedule
// follow the published architecture.
//
// Interface and timing (this design's choice, see sed_controller): pulse
// start while ready is high; rows 0..31 are requested on mem_rd_en/mem_rd_addr
// in cycles 0..31 and must be returned on mem_rd_data one cycle later
// (synchronous memory); done is high in cycle 33, when dec_4x4, dec_8x8,
// dec_16x16 and dec_32x32 hold all 85 decisions. The decision vectors are in
// raster order (bit by*N + bx for the block in block row by, block column bx,
// N = 32/size) and keep their values until the matching band of the next
// block is decided.
module sed_top
  import sed_pkg::*;
#(
  parameter thr_table_t THRESHOLDS = DEFAULT_THRESHOLDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  resolution_e res_sel,       // resolution class of the frame, sampled at start
  output logic        ready,
  // shared memory read port (one row of the 32x32 block per read)
  output logic        mem_rd_en,
  output row_idx_t    mem_rd_addr,
  input  row_t        mem_rd_data,
  // classifications
  output logic        done,
  output logic [63:0] dec_4x4,
  output logic [15:0] dec_8x8,
  output logic [3:0]  dec_16x16,
  output logic        dec_32x32
);

  logic        row_valid;
  row_idx_t    row_idx;
  resolution_e res_q;
  thr_set_t    thr;

  sed_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .res_in     (res_sel),
    .ready      (ready),
    .mem_rd_en  (mem_rd_en),
    .mem_rd_addr(mem_rd_addr),
    .row_valid  (row_valid),
    .row_idx    (row_idx),
    .res_q      (res_q),
    .done       (done)
  );

  sed_threshold_table #(.THRESHOLDS(THRESHOLDS)) u_thr (
    .res_sel(res_q),
    .thr    (thr)
  );

  for (genvar L = 0; L < N_LEVELS; L++) begin : g_level
    localparam int unsigned BS = MIN_BS << L;
    localparam int unsigned NB = CTU / BS;

    sample_t          top_left  [NB];
    sample_t          top_right [NB];
    logic [NB-1:0]    band_dec;
    logic             band_end;
    logic [ROW_W-1:0] band;
    logic [NB*NB-1:0] dec_out;

    always_comb begin
      band_end = row_valid && (int'(row_idx) % BS == BS - 1);
      band     = ROW_W'(int'(row_idx) / BS);
    end

    sed_input_regs #(.BS(BS)) u_in (
      .clk      (clk),
      .rst_n    (rst_n),
      .row_valid(row_valid),
      .row_idx  (row_idx),
      .row_data (mem_rd_data),
      .top_left (top_left),
      .top_right(top_right)
    );

    for (genvar j = 0; j < NB; j++) begin : g_cls
      sed_classifier #(.W(SAMPLE_W), .THR_W(THR_W)) u_cls (
        .border_a (top_left[j]),
        .border_b (top_right[j]),
        .border_c (mem_rd_data[j*BS]),
        .border_d (mem_rd_data[j*BS + BS - 1]),
        .threshold(thr[L]),
        .decision (band_dec[j])
      );
    end

    sed_output_regs #(.BS(BS)) u_out (
      .clk    (clk),
      .rst_n  (rst_n),
      .wr_en  (band_end),
      .band   (band),
      .dec_in (band_dec),
      .dec_out(dec_out)
    );
  end

  assign dec_4x4   = g_level[0].dec_out;
  assign dec_8x8   = g_level[1].dec_out;
  assign dec_16x16 = g_level[2].dec_out;
  assign dec_32x32 = g_level[3].dec_out[0];

endmodule
