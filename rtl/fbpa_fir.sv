// fbpa_fir: configurable folded bit-plane FIR filter (top level).
//
// The filter computes y_n = sum_{i=0}^{kc-1} c_i * x_{n-i} with unsigned
// kc coefficients of mc bits each, programmable at run time under the
// constraint kc * mc = L = K * N. Each output is formed by one chain of L
// operations; operation p adds 2^j * c_i^j * x to the running sum, where
// coefficient c_{kc-1-floor(p/mc)} is used for p in its block of mc
// operations and j = p mod mc. A chain starting with input word x_a uses
// x_a with c_{kc-1}, then x_{a+1} with c_{kc-2}, ..., and ends as
// y_{a+kc-1}.
//
// Folding: operation p runs in section S_s, s = p mod K, in slot
// r = p mod N (gcd(K, N) = 1 makes this one-to-one). The K sections form a
// ring: the partial sum and its input word move one section per cycle, and
// from S_{K-1} back to S_0, so a chain circles the ring N times. Every N
// cycles one chain completes and leaves as y, and S_0 starts a new one;
// K chains are in flight at any time. The sections, IDEM ring, switches and
// coefficient assignment follow the architecture; the parameter defaults
// (K = 3, N = 4) are those of the worked example, DW = 8 is this design's
// choice.
//
// Supported splits: the IDEM can hand a chain a fresh word only in S_0 and
// only the word currently being presented, so mc must be a multiple of K
// and floor(i*mc/N) == i for every coefficient i (cfg_ok reports this). For
// K = 3, N = 4 that is mc = 6 (kc = 2) and mc = 12 (kc = 1).
//
// Interface and timing:
//   - While run is low the array is cleared and cfg_we may load cfg_mc and
//     cfg_coef = {c_0, ..., c_{kc-1}} (c_{kc-1} in the LSBs); cfg_we is
//     ignored while run is high.
//   - After run rises, x_take is high every N cycles (first in the first
//     cycle); x_in must carry x_0, x_1, ... in those cycles.
//   - y_valid pulses every N cycles; y_0 appears (K + 1 - kc) * N cycles
//     after x_0 was taken (2*mc - N for kc = 2). y holds its value between
//     pulses. No LSBs are truncated: W = DW + L bits cannot overflow.
//   - An assertion flags running with an unsupported split (cfg_ok low).
module fbpa_fir
  import fbpa_pkg::*;
#(
  parameter int unsigned K  = DEF_K,
  parameter int unsigned N  = DEF_N,
  parameter int unsigned DW = DEF_DW,
  parameter int unsigned L  = K * N,
  parameter int unsigned W  = DW + L,
  parameter int unsigned SW = $clog2(L),
  parameter int unsigned MW = $clog2(L + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic           cfg_we,
  input  logic [MW-1:0]  cfg_mc,
  input  logic [L-1:0]   cfg_coef,
  output logic           cfg_ok,
  input  logic [DW-1:0]  x_in,
  output logic           x_take,
  output logic [W-1:0]   y,
  output logic           y_valid
);
  if (gcd(K, N) != 1) begin : g_bad_fold
    $error("fbpa_fir: K and N must be coprime");
  end
  if (N < 2) begin : g_bad_n
    $error("fbpa_fir: N must be at least 2");
  end

  logic [L-1:0]             coef_q;
  logic [L-1:0][SW-1:0]     jtab;
  logic [MW-1:0]            mc_q;
  logic [MW-1:0]            kc;
  logic [$clog2(N)-1:0]     slot;
  logic                     load0;
  logic                     new_chain;
  logic                     out_ok;
  logic [N-1:0][SW-1:0]     s0_j;
  logic [K-1:0][DW-1:0]     x_tap;
  logic [K-1:0][W-1:0]      sum_q;
  logic [W-1:0]             fb;

  fbpa_coef_bank #(.K(K), .N(N), .L(L), .SW(SW), .MW(MW)) u_coef (
    .clk, .rst_n,
    .cfg_we (cfg_we && !run),
    .cfg_mc, .cfg_coef,
    .coef_q, .jtab, .mc_q, .kc, .cfg_ok
  );

  for (genvar r = 0; r < N; r++) begin : g_s0j
    assign s0_j[r] = jtab[op_index(0, r, K, N)];
  end

  fbpa_controller #(.K(K), .N(N), .L(L), .SW(SW), .MW(MW)) u_ctrl (
    .clk, .rst_n, .run, .s0_j, .kc,
    .slot, .x_take, .load0, .new_chain, .y_valid(out_ok)
  );

  fbpa_idem #(.K(K), .DW(DW)) u_idem (
    .clk, .rst_n, .run,
    .take(x_take), .load(load0), .x_in, .x_tap
  );

  for (genvar s = 0; s < K; s++) begin : g_sec
    logic [N-1:0]          cbits;
    logic [N-1:0][SW-1:0]  shifts;
    for (genvar r = 0; r < N; r++) begin : g_slot
      localparam int unsigned P = op_index(s, r, K, N);
      assign cbits[r]  = coef_q[P];
      assign shifts[r] = jtab[P];
    end
    fbpa_section #(.N(N), .DW(DW), .W(W), .SW(SW)) u_sec (
      .clk, .rst_n, .run, .slot,
      .cbits, .shifts,
      .x      (x_tap[s]),
      .sum_in ((s == 0) ? fb : sum_q[(s == 0) ? 0 : s - 1]),
      .sum_q  (sum_q[s])
    );
  end

  fbpa_output_switch #(.W(W)) u_out (
    .clk, .rst_n, .new_chain, .out_ok,
    .sum_last(sum_q[K-1]), .fb, .y, .y_valid
  );

  // Running with a split the array cannot sequence gives wrong outputs.
  a_cfg_supported : assert property (@(posedge clk) disable iff (!rst_n) run |-> cfg_ok)
    else $error("fbpa_fir: running with unsupported coefficient length %0d", mc_q);
  // Outputs and input takes only happen at the start of an N-cycle period.
  a_out_slot : assert property (@(posedge clk) disable iff (!rst_n)
                                (y_valid || x_take) |-> slot == '0);
endmodule
