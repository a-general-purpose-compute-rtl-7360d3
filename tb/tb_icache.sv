// tb_icache: load random instructions into the instruction cache, then read
// them back at every address, and check that a disabled write changes nothing.
module tb_icache;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [6:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [128];
  int checks = 0, failures = 0;

  icache #(.DEPTH(128)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int r = 0; r < 128; r++) begin
      @(negedge clk); we = 1; waddr = 7'(r); wdata = $urandom; ref_mem[r] = wdata;
    end
    @(negedge clk); we = 0; waddr = 7'd5; wdata = ~ref_mem[5];
    @(negedge clk);
    for (int r = 0; r < 128; r++) begin
      raddr = 7'(127 - r); #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("FAIL addr %0d: %h vs %h", raddr, rdata, ref_mem[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
