// tb_fbpa_fir_sizes: runs the filter at array sizes other than the default
// to exercise the run-time choice of coefficient count and length:
//   K = 3, N = 2 (L = 6):  2 coefficients of 3 bits, then 1 of 6 bits
//   K = 5, N = 4 (L = 20): 4 coefficients of 5 bits, then 1 of 20 bits
//   K = 7, N = 6 (L = 42): 6 coefficients of 7 bits, then 1 of 42 bits
// Each instance is driven and checked by tb_fbpa_fir_run.
module tb_fbpa_fir_sizes;
  logic clk = 1'b0;
  int c0, f0, b0, c1, f1, b1, c2, f2, b2;
  logic d0, d1, d2;
  int checks, failures;

  always #5 clk = ~clk;

  tb_fbpa_fir_run #(.K(3), .N(2), .MC_A(3), .MC_B(6))  u_a (.clk, .checks(c0), .failures(f0), .boundary_loads(b0), .done(d0));
  tb_fbpa_fir_run #(.K(5), .N(4), .MC_A(5), .MC_B(20)) u_b (.clk, .checks(c1), .failures(f1), .boundary_loads(b1), .done(d1));
  tb_fbpa_fir_run #(.K(7), .N(6), .MC_A(7), .MC_B(42)) u_c (.clk, .checks(c2), .failures(f2), .boundary_loads(b2), .done(d2));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("boundary loads: %0d %0d %0d", b0, b1, b2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
