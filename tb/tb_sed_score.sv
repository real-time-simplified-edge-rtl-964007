// tb_sed_score: self-checking test of one SED core. Drives corner cases
// (equal samples, difference equal to and one above the threshold, both
// signs, extremes) and random vectors, and compares DECISION with
// |border_2 - border_1| > threshold computed in integers.
module tb_sed_score;
  logic [7:0] b1, b2, thr;
  logic       dec;
  int checks = 0, failures = 0;

  sed_score #(.W(8), .THR_W(8)) dut (.border_1(b1), .border_2(b2), .threshold(thr), .decision(dec));

  task automatic check(input int a, input int b, input int t);
    int d;
    logic exp;
    b1 = 8'(a); b2 = 8'(b); thr = 8'(t);
    #1;
    d   = (b > a) ? b - a : a - b;
    exp = (d > t);
    checks++;
    if (dec !== exp) begin
      failures++;
      $display("FAIL b1=%0d b2=%0d thr=%0d dec=%0b exp=%0b", a, b, t, dec, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);
    check(10, 10, 0);
    check(10, 20, 10);   // equal to threshold: homogeneous
    check(10, 21, 10);   // one above: edge
    check(21, 10, 10);
    check(20, 10, 10);
    check(0, 255, 254);
    check(255, 0, 254);
    check(255, 0, 255);
    check(0, 255, 0);
    check(128, 127, 0);
    check(127, 128, 1);
    for (int i = 0; i < 5000; i++)
      check($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 64));
    for (int i = 0; i < 2000; i++)
      check($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
