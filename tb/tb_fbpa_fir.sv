// tb_fbpa_fir: end-to-end test of the folded bit-plane FIR filter at its
// default size (K = 3 sections, N = 4, 8-bit input words).
//
// 1. Schedule: with kc = 2, mc = 6 the weight exponent and input word seen
//    by every section in clock cycles 1..11 are compared with the data-flow
//    diagram of the worked example (operation 2^j c_i^j x_m in section S_s).
// 2. Filtering: for each supported split (mc = 6 and mc = 12) random
//    coefficients and random input words are streamed through and every
//    output is compared with a direct-form FIR model, y_n = sum c_i x_{n-i}.
//    The cycle of y_0 (latency kc*mc - (kc-1)*N, i.e. 2*mc - N for kc = 2)
//    and the spacing of N cycles between outputs are checked.
// 3. Configuration: unsupported lengths must be flagged by cfg_ok, and a
//    write while running must be ignored.
// Mechanisms counted (each must occur): new chain / output, feedback of a
// running chain, IDEM fresh-word load at a coefficient boundary inside a
// chain, reconfiguration between runs, rejected configuration.
module tb_fbpa_fir;
  import fbpa_pkg::*;

  localparam int unsigned K = DEF_K, N = DEF_N, DW = DEF_DW;
  localparam int unsigned L = K * N, W = DW + L, MW = $clog2(L + 1);

  logic           clk = 1'b0;
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

  int checks = 0, failures = 0;
  int n_new_chain = 0, n_feedback = 0, n_boundary_load = 0, n_reconfig = 0,
      n_reject = 0;

  fbpa_fir dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (run) begin
    if (dut.new_chain) n_new_chain++;
    else n_feedback++;
    if (dut.load0 && dut.slot != '0) n_boundary_load++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic configure(input int unsigned mc, input logic [L-1:0] coef);
    @(negedge clk);
    cfg_we = 1'b1; cfg_mc = MW'(mc); cfg_coef = coef;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Data-flow diagram of the worked example (kc = 2, mc = 6):
  // entries {clk, section, coefficient i, bit j, input word m}.
  typedef struct { int clk; int s; int i; int j; int m; } df_t;
  df_t df[] = '{
    '{1,0,1,0,0},
    '{2,1,1,1,0},
    '{3,0,0,0,0}, '{3,2,1,2,0},
    '{4,0,1,3,0}, '{4,1,0,1,0},
    '{5,0,1,0,1}, '{5,1,1,4,0}, '{5,2,0,2,0},
    '{6,0,0,3,0}, '{6,1,1,1,1}, '{6,2,1,5,0},
    '{7,0,0,0,1}, '{7,1,0,4,0}, '{7,2,1,2,1},
    '{8,0,1,3,1}, '{8,1,0,1,1}, '{8,2,0,5,0},
    '{9,0,1,0,2}, '{9,1,1,4,1}, '{9,2,0,2,1},
    '{10,0,0,3,1}, '{10,1,1,1,2}, '{10,2,1,5,1},
    '{11,0,0,0,2}, '{11,1,0,4,1}, '{11,2,1,2,2}
  };

  function automatic int sec_j(int s);
    case (s)
      0: return int'(dut.g_sec[0].u_sec.j_sel);
      1: return int'(dut.g_sec[1].u_sec.j_sel);
      default: return int'(dut.g_sec[2].u_sec.j_sel);
    endcase
  endfunction

  function automatic logic sec_c(int s);
    case (s)
      0: return dut.g_sec[0].u_sec.c_sel;
      1: return dut.g_sec[1].u_sec.c_sel;
      default: return dut.g_sec[2].u_sec.c_sel;
    endcase
  endfunction

  // Stream nx words through the filter in the current configuration and
  // compare every output with the direct-form model.
  task automatic run_filter(input int unsigned mc, input logic [L-1:0] coef,
                            input int nx, input bit dataflow);
    int unsigned kc;
    logic [DW-1:0] xs[$];
    longint unsigned c[];
    longint unsigned exp_y;
    int t, t_first, t_prev, n_out, m_in;
    kc = L / mc;
    c = new[kc];
    for (int i = 0; i < int'(kc); i++) c[i] = longint'((coef >> ((int'(kc) - 1 - i) * int'(mc)))) & ((64'd1 << mc) - 1);
    for (int n = 0; n < nx; n++) xs.push_back(DW'($urandom));
    if (dataflow) begin
      xs[0] = 8'h11; xs[1] = 8'h22; xs[2] = 8'h33;
    end
    @(negedge clk);
    run = 1'b1;
    t = 0; n_out = 0; m_in = 0; t_first = -1; t_prev = -1;
    while (n_out < nx) begin
      // drive the input word for this cycle (held for N cycles)
      x_in = (m_in < nx) ? xs[m_in] : '0;
      #1;
      if (x_take) begin
        check(t % int'(N) == 0, "x_take every N cycles");
        m_in++;
      end
      if (dataflow) begin
        foreach (df[e]) if (df[e].clk == t + 1) begin
          int p;
          p = (1 - df[e].i) * int'(mc) + df[e].j;
          check(sec_j(df[e].s) == df[e].j,
                $sformatf("clk %0d S%0d weight 2^%0d got 2^%0d", t + 1, df[e].s, df[e].j, sec_j(df[e].s)));
          check(dut.x_tap[df[e].s] == xs[df[e].m],
                $sformatf("clk %0d S%0d input word x%0d", t + 1, df[e].s, df[e].m));
          check(sec_c(df[e].s) == coef[p],
                $sformatf("clk %0d S%0d coefficient bit c%0d^%0d", t + 1, df[e].s, df[e].i, df[e].j));
        end
      end
      if (y_valid) begin
        exp_y = 0;
        for (int i = 0; i < int'(kc); i++)
          if (n_out - i >= 0) exp_y += c[i] * longint'(xs[n_out - i]);
        check(longint'(y) == exp_y,
              $sformatf("mc=%0d y%0d = %0d expected %0d", mc, n_out, y, exp_y));
        if (n_out == 0) begin
          t_first = t;
          check(t == int'(kc * mc) - (int'(kc) - 1) * int'(N),
                $sformatf("mc=%0d latency %0d", mc, t));
        end else begin
          check(t - t_prev == int'(N), "one output every N cycles");
        end
        t_prev = t;
        n_out++;
      end
      @(negedge clk);
      t++;
    end
    // y holds the last output between pulses
    #1;
    check(!y_valid && longint'(y) == exp_y, "y held after output");
    run = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic [L-1:0] coef;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // unsupported coefficient lengths are reported
    for (int m = 0; m <= int'(L) + 2; m++) begin
      configure(m, '0);
      #1;
      check(cfg_ok == mc_supported(m, K, N), $sformatf("cfg_ok for mc=%0d", m));
      if (!cfg_ok) n_reject++;
    end
    check(mc_supported(6, K, N) && mc_supported(12, K, N) && !mc_supported(4, K, N),
          "supported lengths for K=3, N=4");

    // worked example: kc = 2, mc = 6, checked against the data-flow diagram
    coef = L'($urandom);
    configure(6, coef);
    n_reconfig++;
    run_filter(6, coef, 40, 1'b1);

    // extreme coefficients
    configure(6, '1);
    n_reconfig++;
    run_filter(6, '1, 12, 1'b0);

    // mode switch: one 12-bit coefficient
    coef = L'($urandom);
    configure(12, coef);
    n_reconfig++;
    run_filter(12, coef, 30, 1'b0);

    // a write while running is ignored
    begin
      logic [L-1:0] c2;
      c2 = L'($urandom);
      configure(6, c2);
      n_reconfig++;
      @(negedge clk);
      run = 1'b1;
      @(negedge clk);
      cfg_we = 1'b1; cfg_mc = MW'(12); cfg_coef = ~c2;
      @(negedge clk);
      cfg_we = 1'b0;
      check(dut.mc_q == MW'(6) && dut.coef_q == c2, "cfg write ignored while running");
      run = 1'b0;
      @(negedge clk);
      run_filter(6, c2, 20, 1'b0);
    end

    $display("mechanisms: new_chain=%0d feedback=%0d boundary_load=%0d reconfig=%0d reject=%0d",
             n_new_chain, n_feedback, n_boundary_load, n_reconfig, n_reject);
    check(n_new_chain > 0, "new chain never happened");
    check(n_feedback > 0, "feedback never happened");
    check(n_boundary_load > 0, "coefficient-boundary load never happened");
    check(n_reconfig > 1, "reconfiguration never happened");
    check(n_reject > 0, "rejected configuration never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
