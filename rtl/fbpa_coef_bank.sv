// fbpa_coef_bank: programmable coefficients of the folded bit-plane filter.
//
// The array performs L = K*N operations per output, one per coefficient bit.
// Operation p uses bit j = p mod mc of coefficient c_{kc-1-floor(p/mc)}, with
// weight 2^j, where mc is the coefficient length and kc = L/mc the number of
// coefficients. The bank stores the L coefficient bits in operation order,
// which is simply the coefficients packed side by side:
//   cfg_coef = {c_0, c_1, ..., c_{kc-1}}   (c_{kc-1} in the mc LSBs)
// so one register of L bits serves every (kc, mc) split. From the stored mc
// it derives, for each operation p, the weight exponent j(p) with a chain of
// L small counters (j(0) = 0, j(p) = j(p-1)+1 wrapping at mc), the number of
// coefficients kc, and whether the split is supported by the array
// (fbpa_pkg::mc_supported). The storage format and the derivation logic are
// this design's choices; the bit assignment follows the operation ordering
// of the data-flow diagram.
//
// Timing: cfg_we writes mc and the coefficient bits on the clock edge; all
// outputs are combinational from the stored values.
module fbpa_coef_bank
  import fbpa_pkg::*;
#(
  parameter int unsigned K  = DEF_K,
  parameter int unsigned N  = DEF_N,
  parameter int unsigned L  = K * N,
  parameter int unsigned SW = $clog2(L),      // weight exponent width
  parameter int unsigned MW = $clog2(L + 1)   // width of mc and kc
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [MW-1:0]        cfg_mc,
  input  logic [L-1:0]         cfg_coef,
  output logic [L-1:0]         coef_q,   // coefficient bit of operation p
  output logic [L-1:0][SW-1:0] jtab,     // weight exponent of operation p
  output logic [MW-1:0]        mc_q,
  output logic [MW-1:0]        kc,
  output logic                 cfg_ok
);
  logic [L:0]           ok_vec;
  logic [L:0][MW-1:0]   kc_vec;

  for (genvar m = 0; m <= L; m++) begin : g_tab
    localparam bit          OK = mc_supported(m, K, N);
    localparam int unsigned KC = (m == 0) ? 0 : L / m;
    assign ok_vec[m] = OK;
    assign kc_vec[m] = MW'(KC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mc_q   <= MW'(L);
      coef_q <= '0;
    end else if (cfg_we) begin
      mc_q   <= cfg_mc;
      coef_q <= cfg_coef;
    end
  end

  assign jtab[0] = '0;
  for (genvar p = 1; p < L; p++) begin : g_j
    assign jtab[p] = ((MW'(jtab[p-1]) + MW'(1)) >= mc_q) ? '0 : jtab[p-1] + SW'(1);
  end

  always_comb begin
    cfg_ok = (mc_q <= MW'(L)) ? ok_vec[mc_q] : 1'b0;
    kc     = (mc_q <= MW'(L)) ? kc_vec[mc_q] : '0;
  end
endmodule
