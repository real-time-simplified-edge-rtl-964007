// tb_sed_top: end-to-end test of the SED system at its default parameters.
//
// A behavioural row memory holds a 32x32 depth block. For each of a series of
// blocks (flat, flat with small noise, vertical / horizontal / diagonal step
// edges, ramps, random noise, corner values placed exactly at the threshold)
// the test pulses start, serves the row reads and, in the done cycle, compares
// all 85 decisions with a reference computed here from the block's corner
// samples and the expected thresholds. It checks that done comes 33 cycles
// after start (34 cycles per block), that start is ignored while a block is in
// flight, and that a block can start in the done cycle of the previous one.
// Each mechanism (edge and homogeneous decisions at every block size, both
// resolution classes, back-to-back start, start ignored while busy, a corner
// difference equal to the threshold) is counted and must occur at least once.
module tb_sed_top;
  import sed_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  resolution_e res_sel = RES_1024X768;
  logic        ready, mem_rd_en, done;
  row_idx_t    mem_rd_addr;
  row_t        mem_rd_data;
  logic [63:0] dec_4x4;
  logic [15:0] dec_8x8;
  logic [3:0]  dec_16x16;
  logic        dec_32x32;
  row_t        block [CTU];

  int checks = 0, failures = 0;

  // expected thresholds [resolution][level], level 0 = 4x4
  int exp_thr [2][4] = '{'{6, 8, 10, 12}, '{5, 7, 9, 11}};

  // mechanism counters
  int n_edge [4], n_homog [4], n_res [2];
  int n_back_to_back = 0, n_start_ignored = 0, n_tie = 0;

  always #5 clk = ~clk;

  sed_row_memory u_mem (.clk, .block, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data));

  sed_top dut (
    .clk, .rst_n, .start, .res_sel, .ready, .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .done, .dec_4x4, .dec_8x8, .dec_16x16, .dec_32x32);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample_at(input row_t blk [CTU], input int r, input int c);
    return int'(blk[r][c]);
  endfunction

  // Fill the block with pattern `kind`.
  task automatic make_block(input int kind, input int res);
    int base, hi, pos, noise;
    base  = $urandom_range(20, 200);
    hi    = base + $urandom_range(15, 50);
    pos   = $urandom_range(1, 31);
    noise = exp_thr[res][0] - 1;            // stays homogeneous at every size
    for (int r = 0; r < CTU; r++)
      for (int c = 0; c < CTU; c++) begin
        int v;
        case (kind)
          0: v = base;                                            // flat
          1: v = base + $urandom_range(0, noise);                 // flat + small noise
          2: v = (c < pos) ? base : hi;                           // vertical step
          3: v = (r < pos) ? base : hi;                           // horizontal step
          4: v = (r + c < pos + 16) ? base : hi;                  // diagonal step
          5: v = base + (r + c) / 4;                              // slow ramp
          6: v = $urandom_range(0, 255);                          // noise
          7: v = base + $urandom_range(0, 14);                    // noise around the thresholds
          default: begin                                          // threshold ties
            // 4x4 corners differ by exactly the 4x4 threshold, rest flat
            v = base;
            if ((r % 4 == 3) && (c % 4 == 3) && r < 31 && c < 31) v = base + exp_thr[res][0];
          end
        endcase
        if (v > 255) v = 255;
        block[r][c] = 8'(v);
      end
  endtask

  // Compare all 85 decisions with the reference for the block in `blk`.
  task automatic check_decisions(input row_t blk [CTU], input int res);
    for (int l = 0; l < 4; l++) begin
      int bs, nb, t;
      bs = 4 << l; nb = 32 / bs; t = exp_thr[res][l];
      for (int by = 0; by < nb; by++)
        for (int bx = 0; bx < nb; bx++) begin
          int s [4];
          int mx, mn;
          logic exp, got;
          s[0] = sample_at(blk, by*bs, bx*bs);
          s[1] = sample_at(blk, by*bs, bx*bs + bs - 1);
          s[2] = sample_at(blk, by*bs + bs - 1, bx*bs);
          s[3] = sample_at(blk, by*bs + bs - 1, bx*bs + bs - 1);
          mx = s[0]; mn = s[0];
          for (int k = 1; k < 4; k++) begin
            if (s[k] > mx) mx = s[k];
            if (s[k] < mn) mn = s[k];
          end
          exp = (mx - mn) > t;
          if (mx - mn == t) n_tie++;
          case (l)
            0: got = dec_4x4[by*nb + bx];
            1: got = dec_8x8[by*nb + bx];
            2: got = dec_16x16[by*nb + bx];
            default: got = dec_32x32;
          endcase
          checks++;
          if (got !== exp) begin
            failures++;
            $display("FAIL size %0d block (%0d,%0d): got %0b exp %0b", bs, by, bx, got, exp);
          end
          if (exp) n_edge[l]++; else n_homog[l]++;
        end
    end
  endtask

  // One block: start is driven in the current cycle (it must be accepted),
  // then done is awaited. If chain is set, the next block's start is issued in
  // the done cycle, which this task returns in.
  row_t cur_block [CTU];
  int   cur_res;

  task automatic run_block(input int kind, input int res, input bit noisy_start);
    int cyc;
    make_block(kind, res);
    cur_block = block;
    cur_res   = res;
    n_res[res]++;
    #1;
    checks++;
    if (!ready) begin
      failures++;
      $display("FAIL ready low at start");
    end
    start = 1; res_sel = resolution_e'(res);
    @(posedge clk); #1;
    start = 0; res_sel = resolution_e'(1 - res);
    cyc = 1;
    while (!done && cyc < 100) begin
      if (noisy_start && $urandom_range(0, 3) == 0) begin
        start = 1;
        n_start_ignored++;
      end
      #1;
      if (start && ready) begin
        failures++;
        $display("FAIL ready high while busy, cycle %0d", cyc);
      end
      @(posedge clk); #1;
      start = 0;
      cyc++;
    end
    checks++;
    if (cyc != 33) begin
      failures++;
      $display("FAIL done in cycle %0d, expected 33", cyc);
    end
    check_decisions(cur_block, cur_res);
  endtask

  initial begin
    foreach (n_edge[l]) begin n_edge[l] = 0; n_homog[l] = 0; end
    n_res[0] = 0; n_res[1] = 0;
    for (int r = 0; r < CTU; r++) block[r] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // after reset no decision is set
    checks++;
    if (dec_4x4 != 0 || dec_8x8 != 0 || dec_16x16 != 0 || dec_32x32 != 0) begin
      failures++;
      $display("FAIL decisions not cleared by reset");
    end
    for (int i = 0; i < 60; i++) begin
      int kind;
      bit chain;
      kind  = (i < 9) ? i : $urandom_range(0, 8);
      chain = (i > 0) && (i % 3 == 0);
      if (!chain) begin
        // leave the done cycle idle, then a few idle cycles
        @(posedge clk); #1;
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end else begin
        n_back_to_back++;   // start issued in the done cycle of the previous block
      end
      run_block(kind, i % 2, i % 4 == 1);
    end
    @(posedge clk); #1;
    for (int l = 0; l < 4; l++) begin
      checks += 2;
      if (n_edge[l] == 0)  begin failures++; $display("FAIL no edge decision at level %0d", l); end
      if (n_homog[l] == 0) begin failures++; $display("FAIL no homogeneous decision at level %0d", l); end
    end
    checks += 5;
    if (n_res[0] == 0 || n_res[1] == 0) begin failures++; $display("FAIL a resolution class unused"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back block"); end
    if (n_start_ignored == 0) begin failures++; $display("FAIL no start while busy"); end
    if (n_tie == 0) begin failures++; $display("FAIL no threshold tie"); end
    if (checks < 1000) begin failures++; $display("FAIL too few checks"); end
    $display("edge decisions per size: %0d %0d %0d %0d", n_edge[0], n_edge[1], n_edge[2], n_edge[3]);
    $display("homogeneous decisions per size: %0d %0d %0d %0d", n_homog[0], n_homog[1], n_homog[2], n_homog[3]);
    $display("blocks per resolution: %0d %0d, back-to-back %0d, start while busy %0d, ties %0d",
             n_res[0], n_res[1], n_back_to_back, n_start_ignored, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
