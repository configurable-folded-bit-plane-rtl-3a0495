// tb_fbpa_section: random test of one processing element at its default
// size (N = 4 slots, 8-bit words, 20-bit sums). Each cycle a random slot,
// coefficient bits, weights, input word and incoming sum are applied; one
// cycle later the registered sum must equal
//   sum_in + (cbits[slot] ? x << shifts[slot] : 0)  (mod 2^W).
// Also checked: clear while run is low.
module tb_fbpa_section;
  localparam int unsigned N = 4, DW = 8, W = 20, SW = 4;

  logic                 clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [1:0]           slot = '0;
  logic [N-1:0]         cbits = '0;
  logic [N-1:0][SW-1:0] shifts = '0;
  logic [DW-1:0]        x = '0;
  logic [W-1:0]         sum_in = '0, sum_q;
  int checks = 0, failures = 0;

  fbpa_section #(.N(N), .DW(DW), .W(W), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expect_q;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      slot   = 2'($urandom);
      cbits  = N'($urandom);
      for (int r = 0; r < int'(N); r++) shifts[r] = SW'($urandom_range(0, 12));
      x      = DW'($urandom);
      sum_in = W'($urandom);
      expect_q = sum_in + (cbits[slot] ? (W'(x) << shifts[slot]) : '0);
      @(negedge clk);
      checks++;
      if (sum_q != expect_q) begin
        failures++;
        $display("FAIL: slot=%0d c=%b j=%0d x=%0d sum_in=%0d -> %0d expected %0d",
                 slot, cbits[slot], shifts[slot], x, sum_in, sum_q, expect_q);
      end
    end
    run = 1'b0;
    @(negedge clk);
    checks++;
    if (sum_q != '0) begin
      failures++;
      $display("FAIL: not cleared while run is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
