// fbpa_idem: Input Data Entering Module of the folded bit-plane FIR filter.
//
// Every partial sum travelling through the ring of sections needs the input
// word x that its current coefficient multiplies. The IDEM keeps that word
// next to the sum: a ring of K D registers, one per section, moves the words
// from section to section in step with the partial sums, and the last one
// feeds back to the input switch in front of section S_0. The switch takes a
// fresh input word instead of the circulating one when S_0 starts a new
// coefficient of a chain (load = 1), which includes the start of a new
// output chain.
//
// Input words arrive one per N clock cycles. take marks the cycle in which
// the next word is on x_in; it is captured into a hold register so that a
// load later in the same N-cycle period sees the same word. The ring, the
// feedback and the input switch follow the architecture figure; the hold
// register and the take/load interface are this design's choices.
//
// Timing: x_tap[0] is combinational from x_in / hold / ring; x_tap[s] for
// s > 0 is the register of section s-1. Registers clear while run is low.
module fbpa_idem #(
  parameter int unsigned K  = 3,   // number of sections
  parameter int unsigned DW = 8    // input word width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  logic                   take,   // next input word is on x_in
  input  logic                   load,   // S_0 takes a fresh input word
  input  logic [DW-1:0]          x_in,
  output logic [K-1:0][DW-1:0]   x_tap   // word seen by each section
);
  logic [DW-1:0]          hold;
  logic [DW-1:0]          fresh;
  logic [K-1:0][DW-1:0]   ring;

  always_comb begin
    fresh    = take ? x_in : hold;
    x_tap[0] = load ? fresh : ring[K-1];
    for (int unsigned s = 1; s < K; s++) x_tap[s] = ring[s-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0;
      ring <= '0;
    end else if (!run) begin
      hold <= '0;
      ring <= '0;
    end else begin
      if (take) hold <= x_in;
      ring <= x_tap;
    end
  end
endmodule
