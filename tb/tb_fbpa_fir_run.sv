// tb_fbpa_fir_run: test driver for one fbpa_fir instance of size K x N,
// used by tb_fbpa_fir_sizes. For each of two coefficient lengths MC_A and
// MC_B (both must be supported splits of the array) it loads random
// coefficients, streams NX random words, and compares every output with a
// direct-form FIR model; it also checks the latency of y_0,
// kc*mc - (kc-1)*N cycles, the output spacing of N cycles and cfg_ok.
// Reports its check and failure counts and raises done when finished.
module tb_fbpa_fir_run #(
  parameter int unsigned K    = 3,
  parameter int unsigned N    = 2,
  parameter int unsigned MC_A = 3,
  parameter int unsigned MC_B = 6,
  parameter int          NX   = 30
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   boundary_loads,
  output logic done
);
  localparam int unsigned DW = 8;
  localparam int unsigned L = K * N, W = DW + L, MW = $clog2(L + 1);

  logic           rst_n = 1'b0;
  logic           run = 1'b0;
  logic           cfg_we = 1'b0;
  logic [MW-1:0]  cfg_mc = '0;
  logic [L-1:0]   cfg_coef = '0;
  logic           cfg_ok;
  logic [DW-1:0]  x_in = '0;
  logic           x_take;
  logic [W-1:0]   y;
  logic           y_valid;

  fbpa_fir #(.K(K), .N(N), .DW(DW)) dut (.*);

  initial begin
    checks = 0; failures = 0; boundary_loads = 0; done = 1'b0;
  end

  always @(posedge clk)
    if (run && dut.load0 && dut.slot != '0) boundary_loads++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (K=%0d N=%0d): %s", K, N, what);
    end
  endtask

  task automatic run_mc(input int unsigned mc);
    int unsigned kc;
    logic [L-1:0] coef;
    logic [DW-1:0] xs[$];
    longint unsigned c[];
    longint unsigned exp_y;
    int t, t_prev, n_out, m_in;
    kc = L / mc;
    coef = L'({$urandom, $urandom});
    c = new[kc];
    for (int i = 0; i < int'(kc); i++)
      c[i] = longint'(coef >> ((int'(kc) - 1 - i) * int'(mc))) & ((64'd1 << mc) - 1);
    for (int n = 0; n < NX; n++) xs.push_back(DW'($urandom));
    @(negedge clk);
    cfg_we = 1'b1; cfg_mc = MW'(mc); cfg_coef = coef;
    @(negedge clk);
    cfg_we = 1'b0;
    #1;
    check(cfg_ok, $sformatf("mc=%0d reported unsupported", mc));
    @(negedge clk);
    run = 1'b1;
    t = 0; n_out = 0; m_in = 0; t_prev = 0;
    while (n_out < NX && t < 100 * NX * int'(N)) begin
      x_in = (m_in < NX) ? xs[m_in] : '0;
      #1;
      if (x_take) m_in++;
      if (y_valid) begin
        exp_y = 0;
        for (int i = 0; i < int'(kc); i++)
          if (n_out - i >= 0) exp_y += c[i] * longint'(xs[n_out - i]);
        check(longint'(y) == exp_y, $sformatf("mc=%0d y%0d = %0d expected %0d", mc, n_out, y, exp_y));
        if (n_out == 0)
          check(t == int'(kc * mc) - (int'(kc) - 1) * int'(N), $sformatf("mc=%0d latency %0d", mc, t));
        else
          check(t - t_prev == int'(N), "output spacing");
        t_prev = t;
        n_out++;
      end
      @(negedge clk);
      t++;
    end
    check(n_out == NX, "all outputs produced");
    run = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_mc(MC_A);
    run_mc(MC_B);
    check(boundary_loads > 0 || MC_A == L, "coefficient-boundary load happened");
    done = 1'b1;
  end
endmodule
