// tb_fbpa_output_switch: test of the output switch (W = 20). Random sums
// and strobes are applied; fb must be 0 in a new-chain cycle and the last
// section's sum otherwise; y must show the sum in an output cycle and keep
// the last output in between; y_valid only when new_chain and out_ok.
module tb_fbpa_output_switch;
  localparam int unsigned W = 20;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         new_chain = 1'b0, out_ok = 1'b0;
  logic [W-1:0] sum_last = '0, fb, y;
  logic         y_valid;
  int checks = 0, failures = 0;

  fbpa_output_switch #(.W(W)) dut (.*);

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
    logic [W-1:0] last;
    last = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 500; it++) begin
      new_chain = $urandom_range(0, 3) == 0;
      out_ok    = $urandom_range(0, 3) != 0;
      sum_last  = W'($urandom);
      #1;
      check(fb == (new_chain ? '0 : sum_last), "feedback path");
      check(y_valid == (new_chain && out_ok), "y_valid");
      if (new_chain && out_ok) begin
        check(y == sum_last, "y in output cycle");
        last = sum_last;
      end else begin
        check(y == last, "y held");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
