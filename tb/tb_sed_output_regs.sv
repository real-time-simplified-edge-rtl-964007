// tb_sed_output_regs: writes random band decisions into the output registers
// of the 4x4 (8 bands of 8) and 16x16 (2 bands of 2) levels, with random idle
// cycles, and checks after every cycle that exactly the addressed band
// changed, against a copy kept by the testbench.
module tb_sed_output_regs;
  import sed_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr4 = 0, wr16 = 0;
  logic [ROW_W-1:0] band4 = '0, band16 = '0;
  logic [7:0]  din4 = '0;
  logic [1:0]  din16 = '0;
  logic [63:0] dout4, exp4;
  logic [3:0]  dout16, exp16;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sed_output_regs #(.BS(4))  dut4  (.clk, .rst_n, .wr_en(wr4),  .band(band4),  .dec_in(din4),  .dec_out(dout4));
  sed_output_regs #(.BS(16)) dut16 (.clk, .rst_n, .wr_en(wr16), .band(band16), .dec_in(din16), .dec_out(dout16));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp4 = '0; exp16 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr4    = ($urandom_range(0, 2) != 0);
      wr16   = ($urandom_range(0, 2) != 0);
      band4  = ROW_W'($urandom_range(0, 7));
      band16 = ROW_W'($urandom_range(0, 1));
      din4   = 8'($urandom);
      din16  = 2'($urandom);
      if (wr4)  for (int j = 0; j < 8; j++) exp4[int'(band4) * 8 + j] = din4[j];
      if (wr16) for (int j = 0; j < 2; j++) exp16[int'(band16) * 2 + j] = din16[j];
      @(posedge clk); #1;
      checks += 2;
      if (dout4 !== exp4) begin
        failures++;
        $display("FAIL 4x4 got %h exp %h", dout4, exp4);
      end
      if (dout16 !== exp16) begin
        failures++;
        $display("FAIL 16x16 got %b exp %b", dout16, exp16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
