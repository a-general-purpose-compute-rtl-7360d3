// tb_damem: self-checking test of the DAMEM array.
// Writes random rows, reads them back against a reference array, checks that a
// write is visible to a read in the next cycle, and checks the CIM product
// output (read row AND column multiplier bits) for random multiplier patterns.
module tb_damem;
  localparam int ROWS = 128;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [6:0] waddr, raddr;
  logic [31:0] wdata, rdata, wbit, prod;
  logic [31:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  damem #(.ROWS(ROWS), .WIDTH(32)) dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0; wbit = 0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      we = 1; waddr = 7'(r); wdata = $urandom; ref_mem[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < ROWS; r++) begin
      raddr = 7'(r); wbit = $urandom; #1;
      check(rdata, ref_mem[r], "read");
      check(prod, ref_mem[r] & wbit, "cim product");
    end
    // write then read back the next cycle, random order
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'($urandom); wdata = $urandom; ref_mem[waddr] = wdata;
      @(negedge clk);
      we = 0; raddr = waddr; wbit = '1; #1;
      check(rdata, ref_mem[raddr], "read after write");
      check(prod, ref_mem[raddr], "product with all-ones multiplier");
      wbit = '0; #1;
      check(prod, 32'h0, "product with zero multiplier");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
