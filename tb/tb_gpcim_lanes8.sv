// tb_gpcim_lanes8: the processor built with 8 vector lanes instead of 4, to
// show that the lane count scales. Each lane gets its own raw bit-planes; a
// short vector program inverts them into DAMEM, runs a 3-channel DNN layer and
// adds a constant to every output. All lanes are checked against a reference
// model, and the DNN stall against 1 + 64 * 3 cycles.
module tb_gpcim_lanes8;
  import gpcim_pkg::*;
  localparam int LANES = 8;
  localparam int NOUT = 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, running, halted, error;
  mode_e mode;
  logic host_ic_we, host_w_we, host_mem_we;
  logic [6:0] host_ic_addr, host_mem_addr;
  logic [31:0] host_ic_wdata, host_mem_wdata, host_mem_rdata;
  logic [5:0] host_w_addr;
  logic [255:0] host_w_wdata;
  loc_e host_mem_sel;
  logic [2:0] host_mem_lane;
  int checks = 0, failures = 0;

  gpcim_top #(.LANES(LANES)) dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stalls;
  always @(posedge clk) if (rst_n && dut.stall) stalls++;

  logic [31:0] prog [$];
  logic [31:0] raw [LANES][8];
  logic [7:0]  wt [NOUT][32];

  function automatic logic [31:0] ref_out(int l, int o);
    int y;
    y = 0;
    for (int c = 0; c < 32; c++) begin
      logic [7:0] a;
      for (int b = 0; b < 8; b++) a[b] = ~raw[l][b][c];
      y += int'(a) * int'($signed(wt[o][c]));
    end
    return 32'(y + 17);
  endfunction

  initial begin
    rst_n = 0; start = 0; host_ic_we = 0; host_w_we = 0; host_mem_we = 0;
    host_ic_addr = 0; host_ic_wdata = 0; host_w_addr = 0; host_w_wdata = 0;
    host_mem_sel = LOC_DOMEM; host_mem_lane = 0; host_mem_addr = 0; host_mem_wdata = 0;
    stalls = 0;
    for (int p = 0; p < 8; p++)
      prog.push_back(enc_i(ALU_XOR, LOC_DAMEM, 7'(16 + p), LOC_DOMEM, 7'(p), 9'h1FF));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'd16, CSR_DA_BASE));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'd5, CSR_W_BASE));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'd100, CSR_DO_BASE));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'(NOUT), CSR_N_OUT));
    prog.push_back(enc_s(SF_SWITCH, 0, 0, 1'b0, 0, CSR_MODE));
    for (int o = 0; o < NOUT; o++)
      prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, 7'(100 + o), LOC_DOMEM, 7'(100 + o), 9'd17));
    prog.push_back(enc_s(SF_HALT, 0, 0, 1'b0, 0, CSR_MODE));
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); host_ic_we = 1; host_ic_addr = 7'(i); host_ic_wdata = prog[i];
    end
    for (int o = 0; o < NOUT; o++) begin
      @(negedge clk);
      host_ic_we = 0;
      for (int c = 0; c < 32; c++) begin
        wt[o][c] = 8'($urandom);
        host_w_wdata[c*8 +: 8] = wt[o][c];
      end
      host_w_we = 1; host_w_addr = 6'(5 + o);
    end
    for (int l = 0; l < LANES; l++)
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        host_w_we = 0;
        raw[l][b] = $urandom;
        host_mem_we = 1; host_mem_sel = LOC_DOMEM; host_mem_lane = 3'(l);
        host_mem_addr = 7'(b); host_mem_wdata = raw[l][b];
      end
    @(negedge clk); host_mem_we = 0; start = 1;
    @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
    check(32'(error), 0, "no illegal instruction");
    for (int l = 0; l < LANES; l++) begin
      host_mem_lane = 3'(l); host_mem_sel = LOC_DOMEM;
      for (int o = 0; o < NOUT; o++) begin
        host_mem_addr = 7'(100 + o); #1;
        check(host_mem_rdata, ref_out(l, o), $sformatf("lane %0d output %0d", l, o));
      end
    end
    check(32'(stalls), 32'(1 + 64 * NOUT), "DNN stall cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
