// tb_cgra_sizes: the CGRA at the two other array sizes it was evaluated
// in, 2x2 and 6x6 tiles (the default 4x4 is covered by tb_cgra_top). Each
// array runs random programs against a cycle-level reference model
// (cgra_array_check); every link every cycle and every bank word at the
// end must match, and each array must have executed loads, stores and
// multiply-adds.
module tb_cgra_sizes;
  int c2, f2, l2, s2, m2, c6, f6, l6, s6, m6;
  bit d2, d6;
  int checks = 0, failures = 0;

  cgra_array_check #(.R(2), .C(2), .NPROG(10)) u_2x2 (
    .checks(c2), .failures(f2), .n_ld(l2), .n_st(s2), .n_mac(m2), .finished(d2));
  cgra_array_check #(.R(6), .C(6), .NPROG(6)) u_6x6 (
    .checks(c6), .failures(f6), .n_ld(l6), .n_st(s6), .n_mac(m6), .finished(d6));

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (d2 && d6);
    checks = c2 + c6 + 2;
    failures = f2 + f6;
    if (l2 == 0 || s2 == 0 || m2 == 0) begin failures++; $display("FAIL 2x2 did no memory or mac work"); end
    if (l6 == 0 || s6 == 0 || m6 == 0) begin failures++; $display("FAIL 6x6 did no memory or mac work"); end
    $display("2x2: %0d checks, %0d loads, %0d stores, %0d mac", c2, l2, s2, m2);
    $display("6x6: %0d checks, %0d loads, %0d stores, %0d mac", c6, l6, s6, m6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
