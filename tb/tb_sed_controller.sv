// tb_sed_controller: checks the block schedule. After start is accepted in
// cycle 0, rows 0..31 must be requested in cycles 0..31, presented as
// row_valid/row_idx in cycles 1..32, and done must be high in cycle 33 only
// (34 cycles per block). Also checks that start is ignored while a block is
// in flight, that a new block can start in the done cycle, and that the
// resolution class is latched at start.
module tb_sed_controller;
  import sed_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  resolution_e res_in = RES_1024X768, res_q;
  logic        ready, mem_rd_en, row_valid, done;
  row_idx_t    mem_rd_addr, row_idx;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  sed_controller dut (.clk, .rst_n, .start, .res_in, .ready, .mem_rd_en, .mem_rd_addr,
                      .row_valid, .row_idx, .res_q, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s got %0b exp %0b", cyc, what, got, exp);
    end
  endtask

  // Runs one block whose start is accepted in the current cycle (cycle 0)
  // and checks cycles 0..32. prev_done says whether the previous block's done
  // is expected in cycle 0 (back-to-back start in the done cycle).
  task automatic run_block(input resolution_e r, input bit noisy_start, input bit prev_done);
    for (cyc = 0; cyc <= 32; cyc++) begin
      if (cyc == 0) begin
        start  = 1;
        res_in = r;
      end else begin
        start  = noisy_start ? 1'($urandom) : 1'b0;
        res_in = resolution_e'(~r);
      end
      #1;
      expect_bit("ready", ready, cyc == 0);
      expect_bit("mem_rd_en", mem_rd_en, cyc <= 31);
      if (cyc <= 31) begin
        checks++;
        if (mem_rd_addr != row_idx_t'(cyc)) begin
          failures++;
          $display("FAIL cycle %0d addr %0d", cyc, mem_rd_addr);
        end
      end
      expect_bit("row_valid", row_valid, cyc >= 1 && cyc <= 32);
      if (cyc >= 1 && cyc <= 32) begin
        checks++;
        if (row_idx != row_idx_t'(cyc - 1)) begin
          failures++;
          $display("FAIL cycle %0d row_idx %0d", cyc, row_idx);
        end
        expect_bit("res_q", res_q, r);
      end
      expect_bit("done", done, (cyc == 0) ? prev_done : 1'b0);
      @(posedge clk);
      #1;
    end
  endtask

  // Cycle 33 with no new start: done high, ready high, nothing read.
  task automatic idle_done();
    cyc = 33;
    start = 0;
    #1;
    expect_bit("done", done, 1'b1);
    expect_bit("ready", ready, 1'b1);
    expect_bit("mem_rd_en", mem_rd_en, 1'b0);
    @(posedge clk); #1;
    cyc = 34;
    #1;
    expect_bit("done after", done, 1'b0);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    // idle: nothing happens without start
    repeat (5) begin
      #1;
      expect_bit("idle rd_en", mem_rd_en, 1'b0);
      expect_bit("idle ready", ready, 1'b1);
      @(posedge clk); #1;
    end
    run_block(RES_1024X768, 0, 0);
    idle_done();
    run_block(RES_1920X1088, 1, 0);
    // next block starts in the done cycle of the previous one
    run_block(RES_1024X768, 1, 1);
    run_block(RES_1920X1088, 0, 1);
    idle_done();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
