// tb_fbpa_pkg: checks the package functions against direct enumeration.
// op_index(s, r) must return the operation p with p mod k == s and
// p mod N == r, and every (s, r) pair must give a distinct operation when
// gcd(k, N) == 1. mc_supported is compared, for the default 3 x 4 array,
// with the splits worked out by hand (mc = 6, two coefficients, and
// mc = 12, one coefficient), and for a 5 x 4 array (mc = 5 and 20).
module tb_fbpa_pkg;
  import fbpa_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ks[4] = '{3, 5, 2, 7};
    int unsigned ns[4] = '{4, 4, 3, 6};
    check(gcd(12, 18) == 6 && gcd(3, 4) == 1 && gcd(7, 7) == 7, "gcd");
    foreach (ks[c]) begin
      bit seen[int];
      seen.delete();
      for (int unsigned s = 0; s < ks[c]; s++)
        for (int unsigned r = 0; r < ns[c]; r++) begin
          int unsigned p;
          p = op_index(s, r, ks[c], ns[c]);
          check(p < ks[c] * ns[c] && p % ks[c] == s && p % ns[c] == r,
                $sformatf("op_index(%0d,%0d) k=%0d N=%0d = %0d", s, r, ks[c], ns[c], p));
          check(!seen.exists(int'(p)), "operation mapped twice");
          seen[int'(p)] = 1'b1;
        end
    end
    // worked example, Fig. 2: S_0 runs operations 0, 9, 6, 3 in slots 0..3
    check(op_index(0, 0, 3, 4) == 0 && op_index(0, 1, 3, 4) == 9 &&
          op_index(0, 2, 3, 4) == 6 && op_index(0, 3, 3, 4) == 3, "S_0 schedule");
    for (int unsigned m = 0; m <= 14; m++)
      check(mc_supported(m, 3, 4) == (m == 6 || m == 12), $sformatf("mc_supported(%0d,3,4)", m));
    for (int unsigned m = 0; m <= 21; m++)
      check(mc_supported(m, 5, 4) == (m == 5 || m == 20), $sformatf("mc_supported(%0d,5,4)", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
