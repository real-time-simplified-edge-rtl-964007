// tb_sed_frame: whole-frame workload for the SED system at its default
// parameters.
//
// Streams every 32x32 block of two synthetic depth frames through sed_top,
// back to back (each block starts in the done cycle of the previous one):
// a 1024x768 frame (768 blocks, resolution class 0) and a 1920x1080 frame
// padded to 1920x1088 (2040 blocks, resolution class 1). The frames are
// computed on the fly: a smooth background ramp with several flat objects
// (rectangles and discs) at other depths, and a little noise, so that both
// homogeneous regions and sharp object borders occur. The memory model
// answers each row read of the current block one cycle later.
//
// Every decision of every block is compared with a reference computed from
// the frame samples, and the cycles taken per frame are measured: a block
// must not take more than 34 cycles, which is what one 1080p view at 30
// frames/s needs at about 2.1 MHz.
module tb_sed_frame;
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

  int checks = 0, failures = 0;
  int exp_thr [2][4] = '{'{6, 8, 10, 12}, '{5, 7, 9, 11}};
  int n_edge = 0, n_homog = 0;

  // current frame and block position, used by the memory model
  int frame_w, frame_h, pic_h, blk_x, blk_y;

  always #5 clk = ~clk;

  sed_top dut (
    .clk, .rst_n, .start, .res_sel, .ready, .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .done, .dec_4x4, .dec_8x8, .dec_16x16, .dec_32x32);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Synthetic depth sample at (x, y); rows past the picture height repeat
  // the last picture row (padding).
  function automatic int pixel(input int x, input int y);
    int v, dx, dy, yy;
    yy = (y >= pic_h) ? pic_h - 1 : y;
    v  = 40 + (x + yy) / 64;                                           // far background ramp
    if (x >= frame_w / 5 && x < frame_w / 2 && yy >= frame_h / 4 && yy < frame_h * 3 / 4)
      v = 120;                                                         // box
    if (x >= frame_w * 3 / 5 && x < frame_w * 4 / 5 && yy >= frame_h / 8 && yy < frame_h / 3)
      v = 90;                                                          // second box
    dx = x - frame_w * 2 / 3; dy = yy - frame_h * 2 / 3;
    if (dx * dx + dy * dy < (frame_h / 5) * (frame_h / 5)) v = 200;    // disc, near
    dx = x - frame_w / 3; dy = yy - frame_h / 2;
    if (dx * dx + dy * dy < (frame_h / 10) * (frame_h / 10)) v = 160;  // small disc on the box
    v += ((x * 7 + yy * 13) % 5 == 0) ? 3 : 0;                         // sparse small noise
    return v;
  endfunction

  // memory model: one row of the current block per read, one cycle later
  always_ff @(posedge clk) begin
    if (mem_rd_en)
      for (int c = 0; c < CTU; c++)
        mem_rd_data[c] <= 8'(pixel(blk_x * CTU + c, blk_y * CTU + int'(mem_rd_addr)));
  end

  task automatic check_block(input int bx0, input int by0, input int res);
    for (int l = 0; l < 4; l++) begin
      int bs, nb, t;
      bs = 4 << l; nb = 32 / bs; t = exp_thr[res][l];
      for (int by = 0; by < nb; by++)
        for (int bx = 0; bx < nb; bx++) begin
          int x0, y0, s [4], mx, mn;
          logic exp, got;
          x0 = bx0 * CTU + bx * bs; y0 = by0 * CTU + by * bs;
          s[0] = pixel(x0, y0);          s[1] = pixel(x0 + bs - 1, y0);
          s[2] = pixel(x0, y0 + bs - 1); s[3] = pixel(x0 + bs - 1, y0 + bs - 1);
          mx = s[0]; mn = s[0];
          for (int k = 1; k < 4; k++) begin
            if (s[k] > mx) mx = s[k];
            if (s[k] < mn) mn = s[k];
          end
          exp = (mx - mn) > t;
          case (l)
            0: got = dec_4x4[by*nb + bx];
            1: got = dec_8x8[by*nb + bx];
            2: got = dec_16x16[by*nb + bx];
            default: got = dec_32x32;
          endcase
          checks++;
          if (got !== exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL block (%0d,%0d) size %0d sub (%0d,%0d): got %0b exp %0b",
                       bx0, by0, bs, by, bx, got, exp);
          end
          if (exp) n_edge++; else n_homog++;
        end
    end
  endtask

  // Codes one whole frame, blocks in raster order, back to back.
  task automatic run_frame(input int w, input int h, input int res);
    int nbx, nby, cycles, prev_x, prev_y;
    longint t0;
    frame_w = w; pic_h = h; frame_h = h;
    nbx = w / CTU; nby = (h + CTU - 1) / CTU;
    cycles = 0;
    prev_x = -1; prev_y = -1;
    for (int by = 0; by < nby; by++)
      for (int bx = 0; bx < nbx; bx++) begin
        // this cycle: previous block's done (if any) and this block's start
        #1;
        checks++;
        if (!ready) begin
          failures++;
          $display("FAIL not ready for block (%0d,%0d)", bx, by);
        end
        if (prev_x >= 0) begin
          checks++;
          if (!done) begin failures++; $display("FAIL done missing"); end
          check_block(prev_x, prev_y, res);
        end
        blk_x = bx; blk_y = by;
        start = 1; res_sel = resolution_e'(res);
        @(posedge clk); #1;
        start = 0;
        cycles++;
        while (!done) begin
          @(posedge clk); #1;
          cycles++;
          if (cycles > 40 * nbx * nby) break;
        end
        prev_x = bx; prev_y = by;
      end
    // last block: its done cycle
    checks++;
    if (!done) begin failures++; $display("FAIL done missing"); end
    check_block(prev_x, prev_y, res);
    cycles++;   // the done cycle of the last block
    $display("frame %0dx%0d: %0d blocks in %0d cycles (%0d.%02d cycles per block)", w, h, nbx * nby,
             cycles, cycles / (nbx * nby), (cycles * 100 / (nbx * nby)) % 100);
    checks++;
    if (cycles > 34 * nbx * nby) begin
      failures++;
      $display("FAIL more than 34 cycles per block");
    end
    @(posedge clk); #1;
  endtask

  initial begin
    frame_w = 32; frame_h = 32; pic_h = 32; blk_x = 0; blk_y = 0;
    mem_rd_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    run_frame(1024, 768, 0);
    run_frame(1920, 1080, 1);
    checks += 2;
    if (n_edge == 0)  begin failures++; $display("FAIL no edge block"); end
    if (n_homog == 0) begin failures++; $display("FAIL no homogeneous block"); end
    $display("decisions: %0d edge, %0d homogeneous", n_edge, n_homog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
