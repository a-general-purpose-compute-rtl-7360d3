// tb_adder_tree: exhaustive test of the 8-input adder tree against a bit count.
module tb_adder_tree;
  logic [7:0] bits;
  logic [3:0] sum;
  int checks = 0, failures = 0;

  adder_tree #(.N(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int exp;
      bits = 8'(v);
      exp = 0;
      for (int i = 0; i < 8; i++) exp += (v >> i) & 1;
      #1;
      checks++;
      if (int'(sum) != exp) begin
        failures++;
        $display("FAIL bits=%b sum=%0d expected %0d", bits, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
