// tb_domem: self-checking test of DOMEM, two reads and one write per cycle.
// Each cycle writes a random row and reads two random rows; both reads must
// return the reference contents, including a row written the cycle before.
module tb_domem;
  localparam int ROWS = 128;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [6:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  domem #(.ROWS(ROWS), .WIDTH(32)) dut (.*);

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
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); we = 1; wa = 7'(r); wd = $urandom; ref_mem[r] = wd;
    end
    for (int i = 0; i < 1000; i++) begin
      logic [6:0] last;
      @(negedge clk);
      last = wa;
      ra1 = (i % 3 == 0) ? last : 7'($urandom);
      ra2 = 7'($urandom);
      #1;
      check(rd1, ref_mem[ra1], "port 1");
      check(rd2, ref_mem[ra2], "port 2");
      we = 1; wa = 7'($urandom); wd = $urandom;
      @(posedge clk); ref_mem[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
