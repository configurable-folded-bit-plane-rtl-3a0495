// fbpa_output_switch: output switch and feedback path of the folded array.
//
// The sum register of the last section S_{k-1} is routed two ways. While a
// chain is still running it feeds back to the sum input of section S_0. In
// the cycle in which the chain is complete (new_chain), S_0 gets a zero
// instead (it starts the next chain) and the completed sum is the filter
// output. The switch follows the architecture figure. Holding y stable for
// the N cycles until the next output, and marking the first cycle with
// y_valid, is this design's choice.
//
// Timing: fb and y are combinational in the output cycle; y then keeps its
// value from a hold register until the next output. y_valid is high for one
// cycle per output, once every N cycles.
module fbpa_output_switch #(
  parameter int unsigned W = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          new_chain,  // last section holds a finished sum
  input  logic          out_ok,     // that sum is a real output
  input  logic [W-1:0]  sum_last,   // register of section S_{k-1}
  output logic [W-1:0]  fb,         // sum input of section S_0
  output logic [W-1:0]  y,
  output logic          y_valid
);
  logic [W-1:0] y_hold;

  always_comb begin
    fb      = new_chain ? '0 : sum_last;
    y_valid = new_chain && out_ok;
    y       = y_valid ? sum_last : y_hold;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       y_hold <= '0;
    else if (y_valid) y_hold <= sum_last;
  end
endmodule
