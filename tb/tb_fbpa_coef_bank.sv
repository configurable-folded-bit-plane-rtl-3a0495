// tb_fbpa_coef_bank: test of the coefficient bank (K = 3, N = 4, L = 12).
// For every coefficient length 0..15 it writes random bits and checks the
// stored bits, the weight exponent of every operation (j = p mod mc),
// kc = L / mc and the supported flag against an independent list (only
// mc = 6 and mc = 12 can run on a 3 x 4 array). A write with cfg_we low must
// change nothing.
module tb_fbpa_coef_bank;
  localparam int unsigned K = 3, N = 4, L = 12, SW = 4, MW = 4;

  logic                 clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0;
  logic [MW-1:0]        cfg_mc = '0;
  logic [L-1:0]         cfg_coef = '0;
  logic [L-1:0]         coef_q;
  logic [L-1:0][SW-1:0] jtab;
  logic [MW-1:0]        mc_q, kc;
  logic                 cfg_ok;
  int checks = 0, failures = 0;

  fbpa_coef_bank #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 16; m++) begin
      logic [L-1:0] bits;
      bits = L'($urandom);
      cfg_we = 1'b1; cfg_mc = MW'(m); cfg_coef = bits;
      @(negedge clk);
      cfg_we = 1'b0;
      cfg_coef = ~bits; cfg_mc = MW'(m + 1);
      @(negedge clk);
      check(coef_q == bits && mc_q == MW'(m), $sformatf("stored config mc=%0d", m));
      check(cfg_ok == (m == 6 || m == 12), $sformatf("cfg_ok mc=%0d", m));
      if (m >= 1 && m <= int'(L)) begin
        check(kc == MW'(L / m), $sformatf("kc mc=%0d", m));
        for (int p = 0; p < int'(L); p++)
          check(jtab[p] == SW'(p % m), $sformatf("j(%0d) mc=%0d = %0d", p, m, jtab[p]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
