// sed_controller: schedule of one 32x32 block.
//
// A block takes 34 cycles: one cycle to start, 32 cycles of memory reads (one
// 32-sample row per cycle) and one cycle in which the complete classification
// is available. The cycle count follows the published design; the handshake
// (start/ready/done), the synchronous memory with one cycle of read latency
// and the latching of the resolution class at start are this design's choice.
//
// Timing, with start accepted in cycle 0:
//   cycles 0..31  mem_rd_en high, mem_rd_addr = 0..31 (row addresses)
//   cycles 1..32  row_valid high, row_idx = 0..31; the memory returns that row
//   cycle  33     done high for one cycle; all 85 decisions are in place
// start is accepted only while ready is high (no read outstanding), so the
// next block can start in the cycle done is high. Two assertions check the
// schedule in simulation.
module sed_controller
  import sed_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  resolution_e res_in,
  output logic        ready,
  output logic        mem_rd_en,
  output row_idx_t    mem_rd_addr,
  output logic        row_valid,
  output row_idx_t    row_idx,
  output resolution_e res_q,
  output logic        done
);

  typedef enum logic {
    S_IDLE = 1'b0,
    S_READ = 1'b1
  } state_e;

  state_e   state;
  row_idx_t addr_q;
  logic     accept;

  always_comb begin
    ready       = (state == S_IDLE) && !row_valid;
    accept      = start && ready;
    mem_rd_en   = accept || (state == S_READ);
    mem_rd_addr = accept ? '0 : addr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr_q    <= '0;
      row_valid <= 1'b0;
      row_idx   <= '0;
      res_q     <= RES_1024X768;
      done      <= 1'b0;
    end else begin
      row_valid <= mem_rd_en;
      row_idx   <= mem_rd_addr;
      done      <= row_valid && (row_idx == row_idx_t'(CTU - 1));
      if (accept) res_q <= res_in;
      if (mem_rd_en) begin
        addr_q <= mem_rd_addr + 1'b1;
        state  <= (mem_rd_addr == row_idx_t'(CTU - 1)) ? S_IDLE : S_READ;
      end
    end
  end

  // Schedule rules: done is a one-cycle pulse, and once a block is in flight
  // its rows are presented on consecutive cycles in increasing order.
  a_done_pulse : assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_rows_in_order : assert property (@(posedge clk) disable iff (!rst_n)
    (row_valid && row_idx != row_idx_t'(CTU - 1)) |=> (row_valid && row_idx == $past(row_idx) + 1'b1));

endmodule
