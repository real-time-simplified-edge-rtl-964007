// sed_row_memory: behavioural model of the encoder's shared block memory,
// used by the testbenches only.
//
// Holds one 32x32 block of 8-bit depth samples, loaded by the testbench
// through the `block` input, and returns one full row per read: a read
// requested with rd_en/rd_addr in one cycle delivers the row on rd_data in the
// next cycle (synchronous read, one cycle of latency).
module sed_row_memory
  import sed_pkg::*;
(
  input  logic     clk,
  input  row_t     block [CTU],
  input  logic     rd_en,
  input  row_idx_t rd_addr,
  output row_t     rd_data
);

  initial rd_data = '0;

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= block[rd_addr];
  end

endmodule
