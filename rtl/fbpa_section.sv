// fbpa_section: one processing element (section S_s) of the folded array.
//
// Each section executes the N operations of its folding set, one per clock
// cycle, in the order given by the slot number r = T mod N. In slot r it
// selects its coefficient bit cbits[r] and the bit weight shifts[r] (the
// exponent j in 2^j * c^j * x), aligns the input word x to that weight and
// adds the AND-ed partial product to the incoming partial sum with a row of
// W basic cells. The result is registered (the D register of the section),
// so a partial sum moves one section further every clock cycle.
//
// The row of AND gates and full adders, the N-way coefficient-bit selector
// and the register follow the array description; realising the weight 2^j
// as a left shift of x over a full-precision row of W bits is this design's
// choice (no LSB truncation is done). W must be large enough that the final
// sum cannot overflow; fbpa_fir uses W = DW + k*N.
//
// Timing: sum_q updates on the rising clock edge while run is high; it is
// cleared synchronously while run is low and by the asynchronous reset.
module fbpa_section #(
  parameter int unsigned N  = 4,   // folding factor (slots per section)
  parameter int unsigned DW = 8,   // input word width
  parameter int unsigned W  = 20,  // partial-sum width
  parameter int unsigned SW = 4    // width of a bit-weight exponent
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic [$clog2(N)-1:0]     slot,    // r = T mod N
  input  logic [N-1:0]             cbits,   // coefficient bit per slot
  input  logic [N-1:0][SW-1:0]     shifts,  // bit weight exponent per slot
  input  logic [DW-1:0]            x,       // input word from the IDEM
  input  logic [W-1:0]             sum_in,  // partial sum from previous section
  output logic [W-1:0]             sum_q    // registered partial sum
);
  logic          c_sel;
  logic [SW-1:0] j_sel;
  logic [W-1:0]  x_al;     // x aligned to weight 2^j
  logic [W-1:0]  sum_d;
  logic [W:0]    carry;

  always_comb begin
    c_sel = cbits[slot];
    j_sel = shifts[slot];
    x_al  = W'(x) << j_sel;
  end

  // The carry out of the top cell (carry[W]) is left unused: W is sized by
  // the instantiating design so that no final sum can overflow.
  assign carry[0] = 1'b0;

  for (genvar b = 0; b < W; b++) begin : g_cell
    fbpa_basic_cell u_cell (
      .c    (c_sel),
      .x    (x_al[b]),
      .s_in (sum_in[b]),
      .ci   (carry[b]),
      .s_out(sum_d[b]),
      .co   (carry[b+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sum_q <= '0;
    else if (!run)   sum_q <= '0;
    else             sum_q <= sum_d;
  end
endmodule
