// tb_fbpa_basic_cell: exhaustive test of the basic cell (AND gate + full
// adder). All 16 input combinations are applied and the sum and carry are
// compared with the arithmetic s_in + (c & x) + ci.
module tb_fbpa_basic_cell;
  logic c, x, s_in, ci, s_out, co;
  int checks = 0, failures = 0;

  fbpa_basic_cell dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int total;
      {c, x, s_in, ci} = 4'(v);
      #1;
      total = int'(s_in) + int'(c && x) + int'(ci);
      checks++;
      if ({co, s_out} != 2'(total)) begin
        failures++;
        $display("FAIL: c=%b x=%b s=%b ci=%b -> co=%b s=%b", c, x, s_in, ci, co, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
