// tb_csr_file: checks the CSR map: reset values, MVCSR-style writes of the
// layer configuration, ignored writes to read-only registers, the completed-
// layer counter and the cycle counter.
module tb_csr_file;
  import gpcim_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, we, dnn_done;
  csr_e widx, ridx;
  logic [31:0] wdata, rdata;
  mode_e mode;
  logic [6:0] da_base, do_base;
  logic [5:0] w_base;
  logic [7:0] n_out;
  int checks = 0, failures = 0;

  csr_file #(.DA_AW(7), .W_AW(6), .DO_AW(7)) dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input csr_e i, input logic [31:0] d);
    @(negedge clk); we = 1; widx = i; wdata = d;
    @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] c0, c1;
    rst_n = 0; we = 0; widx = CSR_MODE; ridx = CSR_MODE; wdata = 0; mode = MODE_CPU; dnn_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      ridx = csr_e'(i); #1;
      check(rdata, 32'h0, "reset value");
    end
    wr(CSR_DA_BASE, 32'h45); wr(CSR_W_BASE, 32'h13); wr(CSR_DO_BASE, 32'h70);
    wr(CSR_N_OUT, 32'h21); wr(CSR_SCRATCH, 32'hCAFE_F00D);
    check(32'(da_base), 32'h45, "da_base port");
    check(32'(w_base), 32'h13, "w_base port");
    check(32'(do_base), 32'h70, "do_base port");
    check(32'(n_out), 32'h21, "n_out port");
    ridx = CSR_DA_BASE; #1 check(rdata, 32'h45, "read DA_BASE");
    ridx = CSR_W_BASE;  #1 check(rdata, 32'h13, "read W_BASE");
    ridx = CSR_DO_BASE; #1 check(rdata, 32'h70, "read DO_BASE");
    ridx = CSR_N_OUT;   #1 check(rdata, 32'h21, "read N_OUT");
    ridx = CSR_SCRATCH; #1 check(rdata, 32'hCAFE_F00D, "read SCRATCH");
    wr(CSR_MODE, 32'h1); wr(CSR_DNN_DONE, 32'h55);
    ridx = CSR_MODE; #1 check(rdata, 32'h0, "MODE is read-only");
    mode = MODE_DNN; #1 check(rdata, 32'h1, "MODE follows mode");
    mode = MODE_CPU;
    ridx = CSR_DNN_DONE; #1 check(rdata, 32'h0, "DNN_DONE is read-only");
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); dnn_done = 1; @(negedge clk); dnn_done = 0;
    end
    #1 check(rdata, 32'h3, "DNN_DONE counts layers");
    ridx = CSR_CYCLE; #1 c0 = rdata;
    repeat (10) @(negedge clk);
    #1 c1 = rdata;
    check(c1 - c0, 32'd10, "CYCLE counts cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
