// tb_sed_classifier: self-checking test of the classification module. For
// random and hand-picked corner sets it compares DECISION with the reference
// "largest difference among the four corners is greater than the threshold",
// and makes sure each of the six corner pairs alone can raise an edge.
module tb_sed_classifier;
  logic [7:0] a, b, c, d, thr;
  logic       dec;
  int checks = 0, failures = 0;

  sed_classifier #(.W(8), .THR_W(8)) dut (
    .border_a(a), .border_b(b), .border_c(c), .border_d(d), .threshold(thr), .decision(dec));

  task automatic check(input int va, input int vb, input int vc, input int vd, input int t);
    int mx, mn;
    logic exp;
    a = 8'(va); b = 8'(vb); c = 8'(vc); d = 8'(vd); thr = 8'(t);
    #1;
    mx = va; mn = va;
    if (vb > mx) mx = vb; if (vc > mx) mx = vc; if (vd > mx) mx = vd;
    if (vb < mn) mn = vb; if (vc < mn) mn = vc; if (vd < mn) mn = vd;
    exp = (mx - mn) > t;
    checks++;
    if (dec !== exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%0d d=%0d thr=%0d dec=%0b exp=%0b", va, vb, vc, vd, t, dec, exp);
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
    // all equal
    check(50, 50, 50, 50, 0);
    // each pair alone exceeds the threshold (the other two sit between them)
    check(40, 60, 50, 50, 15);  // a-b
    check(40, 50, 60, 50, 15);  // a-c
    check(40, 50, 50, 60, 15);  // a-d
    check(50, 40, 60, 50, 15);  // b-c
    check(50, 40, 50, 60, 15);  // b-d
    check(50, 50, 40, 60, 15);  // c-d
    // spread equal to the threshold: homogeneous
    check(40, 60, 50, 50, 20);
    check(50, 50, 40, 60, 20);
    for (int i = 0; i < 5000; i++) begin
      int base;
      base = $urandom_range(0, 235);
      check(base + $urandom_range(0, 20), base + $urandom_range(0, 20),
            base + $urandom_range(0, 20), base + $urandom_range(0, 20), $urandom_range(0, 20));
    end
    for (int i = 0; i < 2000; i++)
      check($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255),
            $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
