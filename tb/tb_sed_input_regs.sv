// tb_sed_input_regs: streams random 32x32 blocks, one row per cycle with
// random idle cycles, into the input registers of the 4x4 and 32x32 levels,
// and after every row compares the stored corners with those of the last
// band-top row seen (columns j*BS and j*BS+BS-1), kept by the testbench.
module tb_sed_input_regs;
  import sed_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     row_valid = 0;
  row_idx_t row_idx = '0;
  row_t     row_data = '0;
  sample_t  tl4 [8], tr4 [8];
  sample_t  tl32 [1], tr32 [1];
  int checks = 0, failures = 0;
  row_t     last_top4, last_top32;

  always #5 clk = ~clk;

  sed_input_regs #(.BS(4))  dut4  (.clk, .rst_n, .row_valid, .row_idx, .row_data, .top_left(tl4),  .top_right(tr4));
  sed_input_regs #(.BS(32)) dut32 (.clk, .rst_n, .row_valid, .row_idx, .row_data, .top_left(tl32), .top_right(tr32));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int j = 0; j < 8; j++) begin
      checks += 2;
      if (tl4[j] !== last_top4[j*4] || tr4[j] !== last_top4[j*4+3]) begin
        failures++;
        $display("FAIL 4x4 block %0d: %0d/%0d exp %0d/%0d", j, tl4[j], tr4[j], last_top4[j*4], last_top4[j*4+3]);
      end
    end
    checks += 2;
    if (tl32[0] !== last_top32[0] || tr32[0] !== last_top32[31]) begin
      failures++;
      $display("FAIL 32x32: %0d/%0d exp %0d/%0d", tl32[0], tr32[0], last_top32[0], last_top32[31]);
    end
  endtask

  initial begin
    last_top4 = '0; last_top32 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    compare();   // reset values
    for (int blk = 0; blk < 6; blk++) begin
      for (int r = 0; r < 32; r++) begin
        row_t rd;
        for (int c = 0; c < 32; c++) rd[c] = 8'($urandom);
        // idle cycle with garbage on the bus: must not be captured
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          row_valid = 0; row_idx = row_idx_t'(r - r % 4); row_data = ~rd;
          @(posedge clk); #1; compare();
        end
        @(negedge clk);
        row_valid = 1; row_idx = row_idx_t'(r); row_data = rd;
        if (r % 4 == 0) last_top4 = rd;
        if (r == 0)     last_top32 = rd;
        @(posedge clk); #1;
        compare();
        row_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
