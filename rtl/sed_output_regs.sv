// sed_output_regs: 1-bit classification registers of one block size.
//
// One register per block of edge BS inside the 32x32 block (64 for 4x4, 16 for
// 8x8, 4 for 16x16, 1 for 32x32), stored in raster order: bit
// band*(CTU/BS) + j holds block j of band `band` (1 = edge, 0 = homogeneous).
// When the classification modules of this size have decided a band
// (wr_en high), the CTU/BS decisions of that band are written at the next
// clock edge; other bands keep their values. One register per block, set when
// the block is classified, follows the published design; the raster order and
// reset to zero are this design's choice.
module sed_output_regs
  import sed_pkg::*;
#(
  parameter int unsigned BS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [ROW_W-1:0]              band,     // band (block row) being written
  input  logic [CTU/BS-1:0]             dec_in,   // decisions of the band, bit j = block j
  output logic [(CTU/BS)*(CTU/BS)-1:0]  dec_out
);

  localparam int unsigned NB = CTU / BS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_out <= '0;
    end else if (wr_en) begin
      for (int j = 0; j < NB; j++) begin
        if (int'(band) * NB + j < NB * NB)
          dec_out[int'(band) * NB + j] <= dec_in[j];
      end
    end
  end

endmodule
