// tb_weight_sram: write every row of the weight SRAM with random weights and
// read them back in random order against a reference copy.
module tb_weight_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] waddr, raddr;
  logic [255:0] wdata, rdata;
  logic [255:0] ref_mem [64];
  int checks = 0, failures = 0;

  weight_sram #(.DEPTH(64), .COLS(32), .WBITS(8)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int r = 0; r < 64; r++) begin
      @(negedge clk);
      we = 1; waddr = 6'(r);
      for (int k = 0; k < 8; k++) wdata[k*32 +: 32] = $urandom;
      ref_mem[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 500; i++) begin
      raddr = 6'($urandom); #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("FAIL row %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
