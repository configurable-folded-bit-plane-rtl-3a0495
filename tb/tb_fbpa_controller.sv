// tb_fbpa_controller: test of the schedule controller (K = 3, N = 4).
// Runs the controller for 40 cycles after run rises, for kc = 2 and kc = 1,
// with the S_0 weights of mc = 6 (operations 0, 9, 6, 3 -> j = 0, 3, 0, 3)
// and checks each cycle T: slot == T mod 4, x_take and new_chain only in
// slot 0, load0 exactly in the slots whose weight is 0, and y_valid from
// T = (K + 1 - kc) * N on, every N cycles. Also checks reset to slot 0 when
// run falls.
module tb_fbpa_controller;
  localparam int unsigned K = 3, N = 4, L = 12, SW = 4, MW = 4;

  logic                 clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [N-1:0][SW-1:0] s0_j;
  logic [MW-1:0]        kc = '0;
  logic [1:0]           slot;
  logic                 x_take, load0, new_chain, y_valid;
  int checks = 0, failures = 0;

  fbpa_controller #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    s0_j[0] = 4'd0; s0_j[1] = 4'd3; s0_j[2] = 4'd0; s0_j[3] = 4'd3;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 1; k <= 2; k++) begin
      kc = MW'(k);
      run = 1'b1;
      for (int t = 0; t < 40; t++) begin
        #1;
        check(slot == 2'(t % 4), $sformatf("slot at T=%0d", t));
        check(x_take == (t % 4 == 0), $sformatf("x_take at T=%0d", t));
        check(new_chain == (t % 4 == 0), $sformatf("new_chain at T=%0d", t));
        check(load0 == (t % 2 == 0), $sformatf("load0 at T=%0d", t));
        check(y_valid == (t % 4 == 0 && t >= (int'(K) + 1 - k) * int'(N)),
              $sformatf("y_valid at T=%0d kc=%0d", t, k));
        @(negedge clk);
      end
      run = 1'b0;
      #1;
      check(!x_take && !load0 && !y_valid, "idle outputs while run is low");
      @(negedge clk);
      check(slot == '0, "slot cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
