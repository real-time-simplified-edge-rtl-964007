// sed_input_regs: corner-sample input registers of one block size.
//
// The 32x32 block arrives one row per cycle. For blocks of edge BS, the rows
// 0, BS, 2*BS, ... are the top rows of a band of CTU/BS blocks. When such a row
// is presented (row_valid high, row_idx a multiple of BS), the top-left and
// top-right corner samples of every block in the band (columns j*BS and
// j*BS+BS-1) are stored, two bytes per block: 16 bytes for 4x4, 8 for 8x8,
// 4 for 16x16 and 2 for 32x32, 30 in all. They are held until the band's last
// row arrives, when the classification modules read them together with the
// bottom corners taken straight from that row. Storing only the top corners
// and only the samples still needed follows the published design; the
// interface and the reset to zero are this design's choice.
//
// Timing: samples are captured at the clock edge that ends the cycle in which
// the band's top row is presented.
module sed_input_regs
  import sed_pkg::*;
#(
  parameter int unsigned BS = 4                  // block edge of this level
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     row_valid,
  input  row_idx_t row_idx,
  input  row_t     row_data,
  output sample_t  top_left  [CTU/BS],           // per block of the band
  output sample_t  top_right [CTU/BS]
);

  localparam int unsigned NB = CTU / BS;

  logic band_top;
  always_comb band_top = row_valid && (int'(row_idx) % BS == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NB; j++) begin
        top_left[j]  <= '0;
        top_right[j] <= '0;
      end
    end else if (band_top) begin
      for (int j = 0; j < NB; j++) begin
        top_left[j]  <= row_data[j*BS];
        top_right[j] <= row_data[j*BS + BS - 1];
      end
    end
  end

endmodule
