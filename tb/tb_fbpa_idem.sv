// tb_fbpa_idem: test of the input data entering module (K = 3, 8-bit
// words). A reference ring model is updated alongside the block: the word
// fed to section 0 is the fresh word (x_in when take, else the word held
// from the last take) when load is high, else the word leaving the last
// register; every tap must match the model, and words must move one
// section per cycle.
module tb_fbpa_idem;
  localparam int unsigned K = 3, DW = 8;

  logic                 clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic                 take = 1'b0, load = 1'b0;
  logic [DW-1:0]        x_in = '0;
  logic [K-1:0][DW-1:0] x_tap;
  int checks = 0, failures = 0;
  int n_load = 0, n_recirc = 0;

  fbpa_idem #(.K(K), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] ring[K];
    logic [DW-1:0] hold, t0;
    foreach (ring[s]) ring[s] = '0;
    hold = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    for (int it = 0; it < 600; it++) begin
      take = ($urandom_range(0, 3) == 0);
      load = $urandom_range(0, 1) == 1;
      x_in = DW'($urandom);
      #1;
      t0 = load ? (take ? x_in : hold) : ring[K-1];
      if (load) n_load++; else n_recirc++;
      checks++;
      if (x_tap[0] != t0) begin
        failures++;
        $display("FAIL: tap0 %0d expected %0d", x_tap[0], t0);
      end
      for (int s = 1; s < int'(K); s++) begin
        checks++;
        if (x_tap[s] != ring[s-1]) begin
          failures++;
          $display("FAIL: tap%0d %0d expected %0d", s, x_tap[s], ring[s-1]);
        end
      end
      @(negedge clk);
      if (take) hold = x_in;
      for (int s = int'(K) - 1; s > 0; s--) ring[s] = ring[s-1];
      ring[0] = t0;
    end
    checks++;
    if (n_load == 0 || n_recirc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
