// tb_sed_threshold_table: checks that the threshold table hands each block
// size its own entry for both resolution classes, with the default contents
// and with a second, distinct table passed as a parameter.
module tb_sed_threshold_table;
  import sed_pkg::*;

  localparam thr_table_t ALT = '{
    '{8'd200, 8'd150, 8'd100, 8'd50},
    '{8'd1, 8'd2, 8'd3, 8'd4}
  };

  resolution_e res;
  thr_set_t    thr_def, thr_alt;
  int checks = 0, failures = 0;

  sed_threshold_table                  dut_def (.res_sel(res), .thr(thr_def));
  sed_threshold_table #(.THRESHOLDS(ALT)) dut_alt (.res_sel(res), .thr(thr_alt));

  // Expected values, written out per [resolution][level].
  int exp_def [2][4] = '{'{6, 8, 10, 12}, '{5, 7, 9, 11}};
  int exp_alt [2][4] = '{'{4, 3, 2, 1}, '{50, 100, 150, 200}};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int r = 0; r < 2; r++) begin
        res = resolution_e'(r);
        #1;
        for (int l = 0; l < 4; l++) begin
          checks += 2;
          if (thr_def[l] !== 8'(exp_def[r][l])) begin
            failures++;
            $display("FAIL default res=%0d level=%0d got %0d exp %0d", r, l, thr_def[l], exp_def[r][l]);
          end
          if (thr_alt[l] !== 8'(exp_alt[r][l])) begin
            failures++;
            $display("FAIL alt res=%0d level=%0d got %0d exp %0d", r, l, thr_alt[l], exp_alt[r][l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
