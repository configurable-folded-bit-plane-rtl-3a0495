// fbpa_controller: folding schedule control of the folded bit-plane filter.
//
// Time T counts clock cycles from the moment run goes high. The controller
// keeps the slot r = T mod N that every section uses to pick its coefficient
// bit and weight, and derives the switch settings of the array:
//   x_take    - r == 0: a new input word is taken every N cycles;
//   load0     - section S_0 starts a coefficient in this slot (its operation
//               p has weight exponent j = p mod mc == 0), so the IDEM switch
//               feeds it a fresh input word instead of the circulating one;
//   new_chain - r == 0: S_0 starts a new output chain with a zero sum while
//               the last section's completed sum leaves the array;
//   y_valid   - new_chain and the leaving sum belongs to y_0 or a later
//               output. Chains that started before the first input word
//               carry only zeros; y_0 leaves at T = (K + 1 - kc) * N, which
//               is k_c*m_c - (k_c-1)*N cycles (2*m_c - N for two
//               coefficients) after the first input word.
// The slot counter and the switch conditions come from the architecture; the
// run/period-count mechanics that suppress the leading zero outputs are this
// design's choice.
module fbpa_controller
  import fbpa_pkg::*;
#(
  parameter int unsigned K  = DEF_K,
  parameter int unsigned N  = DEF_N,
  parameter int unsigned L  = K * N,
  parameter int unsigned SW = $clog2(L),
  parameter int unsigned MW = $clog2(L + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  input  logic [N-1:0][SW-1:0]  s0_j,      // weight exponent of S_0 per slot
  input  logic [MW-1:0]         kc,        // number of coefficients
  output logic [$clog2(N)-1:0]  slot,
  output logic                  x_take,
  output logic                  load0,
  output logic                  new_chain,
  output logic                  y_valid
);
  localparam int unsigned CW = $clog2(L + 2) + 1;  // period counter width

  logic [CW-1:0] periods;   // completed N-cycle periods, saturating
  logic          sat;

  always_comb begin
    sat       = (periods >= CW'(K + 1));
    x_take    = run && (slot == '0);
    new_chain = run && (slot == '0);
    load0     = run && (s0_j[slot] == '0);
    y_valid   = new_chain && ((periods + CW'(kc)) >= CW'(K + 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= '0;
      periods <= '0;
    end else if (!run) begin
      slot    <= '0;
      periods <= '0;
    end else if (slot == $clog2(N)'(N - 1)) begin
      slot <= '0;
      if (!sat) periods <= periods + CW'(1);
    end else begin
      slot <= slot + 1'b1;
    end
  end
endmodule
