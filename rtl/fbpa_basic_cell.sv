// fbpa_basic_cell: the basic cell of the bit-plane array.
//
// One AND gate forms a partial-product bit (coefficient bit AND input bit),
// and one full adder adds it to the incoming partial-sum bit and the carry
// from the cell to its right. A row of these cells, rippling the carry from
// LSB to MSB, adds one weighted partial product to a partial sum in one clock
// cycle. Purely combinational; the row's register sits in fbpa_section.
module fbpa_basic_cell (
  input  logic c,     // coefficient bit c_i^j
  input  logic x,     // input word bit (already aligned to the bit weight)
  input  logic s_in,  // partial-sum bit from the previous operation
  input  logic ci,    // carry from the next less significant cell
  output logic s_out, // sum bit
  output logic co     // carry to the next more significant cell
);
  logic pp;

  always_comb begin
    pp    = c & x;
    s_out = s_in ^ pp ^ ci;
    co    = (s_in & pp) | (s_in & ci) | (pp & ci);
  end
endmodule
