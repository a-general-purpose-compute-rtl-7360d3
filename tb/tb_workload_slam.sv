// tb_workload_slam: a SLAM-style mix of CNN and non-CNN work on the default
// processor, one pixel neighbourhood per lane.
//
//  1. Pre-processing on the vector CPU: a software exponentiation p = x^5 by a
//     multiply loop (x differs per lane).
//  2. A two-channel CNN layer on the input bit-planes left in DAMEM by the
//     host; the outputs d0, d1 land in DOMEM.
//  3. Post-processing on the vector CPU: ReLU, then a software 32-bit unsigned
//     restoring division q = (d0 << 4) / (d1 + 1), remainder r, written with
//     branch-free per-lane code inside a 32-iteration loop.
// Division and exponentiation have no instruction of their own, which is the
// point: they run as CPU code next to the CNN without moving data. Every lane's
// p, d0, d1, q and r are checked against a reference model, and the cycle count
// against one cycle per retired instruction, one bubble per taken branch and
// 64 DNN cycles per output channel.
module tb_workload_slam;
  import gpcim_pkg::*;
  localparam int LANES = 4;

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
  logic [1:0] host_mem_lane;
  int checks = 0, failures = 0;

  gpcim_top dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stalls, flushes, retired, run_cycles;
  always @(posedge clk) begin
    if (rst_n && dut.stall) stalls++;
    if (rst_n && dut.flush) flushes++;
    if (rst_n && dut.ex_fire) retired++;
    if (rst_n && running) run_cycles++;
  end

  // DOMEM rows used by the program
  localparam logic [6:0] X = 7'd10, P = 7'd30, PC_ = 7'd31, N = 7'd20, DEN = 7'd21,
                         Q = 7'd22, R = 7'd23, CNT = 7'd24, T0 = 7'd25, T1 = 7'd26,
                         T2 = 7'd27, ZERO = 7'd121, D0 = 7'd64, D1 = 7'd65;
  logic [31:0] prog [$];

  task automatic build_program();
    int loop;
    prog.push_back(enc_r(ALU_XOR, LOC_DOMEM, ZERO, LOC_DOMEM, ZERO, LOC_DOMEM, ZERO));
    // p = x^5
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, P, LOC_DOMEM, ZERO, 9'd1));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, PC_, LOC_DOMEM, ZERO, 9'd5));
    loop = prog.size();
    prog.push_back(enc_r(ALU_MUL, LOC_DOMEM, P, LOC_DOMEM, P, LOC_DOMEM, X));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, PC_, LOC_DOMEM, PC_, 9'h1FF));
    prog.push_back(enc_b(BR_NE, 7'(loop), LOC_DOMEM, PC_, LOC_DOMEM, ZERO));
    // CNN layer: 2 output channels
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'd0, CSR_DA_BASE));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'd0, CSR_W_BASE));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'(D0), CSR_DO_BASE));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'd2, CSR_N_OUT));
    prog.push_back(enc_s(SF_SWITCH, 0, 0, 1'b0, 0, CSR_MODE));
    prog.push_back(enc_i(ALU_MAX, LOC_DOMEM, D0, LOC_DOMEM, D0, 9'd0));
    prog.push_back(enc_i(ALU_MAX, LOC_DOMEM, D1, LOC_DOMEM, D1, 9'd0));
    // division setup
    prog.push_back(enc_i(ALU_SLL, LOC_DOMEM, N, LOC_DOMEM, D0, 9'd4));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, DEN, LOC_DOMEM, D1, 9'd1));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, Q, LOC_DOMEM, ZERO, 9'd0));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R, LOC_DOMEM, ZERO, 9'd0));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, CNT, LOC_DOMEM, ZERO, 9'd32));
    loop = prog.size();
    prog.push_back(enc_i(ALU_SRL, LOC_DOMEM, T0, LOC_DOMEM, N, 9'd31));
    prog.push_back(enc_i(ALU_SLL, LOC_DOMEM, R, LOC_DOMEM, R, 9'd1));
    prog.push_back(enc_r(ALU_OR,  LOC_DOMEM, R, LOC_DOMEM, R, LOC_DOMEM, T0));
    prog.push_back(enc_i(ALU_SLL, LOC_DOMEM, N, LOC_DOMEM, N, 9'd1));
    prog.push_back(enc_r(ALU_SLTU, LOC_DOMEM, T1, LOC_DOMEM, R, LOC_DOMEM, DEN));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, T2, LOC_DOMEM, T1, 9'h1FF));
    prog.push_back(enc_r(ALU_AND, LOC_DOMEM, T0, LOC_DOMEM, DEN, LOC_DOMEM, T2));
    prog.push_back(enc_r(ALU_SUB, LOC_DOMEM, R, LOC_DOMEM, R, LOC_DOMEM, T0));
    prog.push_back(enc_i(ALU_XOR, LOC_DOMEM, T1, LOC_DOMEM, T1, 9'd1));
    prog.push_back(enc_i(ALU_SLL, LOC_DOMEM, Q, LOC_DOMEM, Q, 9'd1));
    prog.push_back(enc_r(ALU_OR,  LOC_DOMEM, Q, LOC_DOMEM, Q, LOC_DOMEM, T1));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, CNT, LOC_DOMEM, CNT, 9'h1FF));
    prog.push_back(enc_b(BR_NE, 7'(loop), LOC_DOMEM, CNT, LOC_DOMEM, ZERO));
    prog.push_back(enc_s(SF_HALT, 0, 0, 1'b0, 0, CSR_MODE));
  endtask

  logic [31:0] x [LANES];
  logic [31:0] planes [LANES][8];
  logic [7:0]  wt [2][32];

  function automatic int dout(int l, int o);
    int y;
    y = 0;
    for (int c = 0; c < 32; c++) begin
      logic [7:0] a;
      for (int b = 0; b < 8; b++) a[b] = planes[l][b][c];
      y += int'(a) * int'($signed(wt[o][c]));
    end
    return (y < 0) ? 0 : y;
  endfunction

  initial begin
    rst_n = 0; start = 0; host_ic_we = 0; host_w_we = 0; host_mem_we = 0;
    host_ic_addr = 0; host_ic_wdata = 0; host_w_addr = 0; host_w_wdata = 0;
    host_mem_sel = LOC_DOMEM; host_mem_lane = 0; host_mem_addr = 0; host_mem_wdata = 0;
    stalls = 0; flushes = 0; retired = 0; run_cycles = 0;
    build_program();
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); host_ic_we = 1; host_ic_addr = 7'(i); host_ic_wdata = prog[i];
    end
    for (int o = 0; o < 2; o++) begin
      @(negedge clk);
      host_ic_we = 0;
      for (int c = 0; c < 32; c++) begin
        // channel 0 mostly positive, channel 1 mixed: both ReLU outcomes occur
        wt[o][c] = (o == 0) ? 8'($urandom % 100) : 8'($urandom);
        host_w_wdata[c*8 +: 8] = wt[o][c];
      end
      host_w_we = 1; host_w_addr = 6'(o);
    end
    for (int l = 0; l < LANES; l++) begin
      x[l] = 32'(l + 3 + ($urandom % 50));
      @(negedge clk);
      host_w_we = 0;
      host_mem_we = 1; host_mem_sel = LOC_DOMEM; host_mem_lane = 2'(l);
      host_mem_addr = X; host_mem_wdata = x[l];
      for (int b = 0; b < 8; b++) begin
        planes[l][b] = $urandom;
        @(negedge clk);
        host_mem_sel = LOC_DAMEM; host_mem_addr = 7'(b); host_mem_wdata = planes[l][b];
      end
    end
    @(negedge clk); host_mem_we = 0; start = 1;
    @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
    check(32'(error), 0, "no illegal instruction");
    for (int l = 0; l < LANES; l++) begin
      logic [31:0] n, d;
      n = 32'(dout(l, 0)) << 4;
      d = 32'(dout(l, 1)) + 1;
      host_mem_lane = 2'(l); host_mem_sel = LOC_DOMEM;
      host_mem_addr = P;  #1 check(host_mem_rdata, x[l] * x[l] * x[l] * x[l] * x[l], $sformatf("lane %0d x^5", l));
      host_mem_addr = D0; #1 check(host_mem_rdata, 32'(dout(l, 0)), $sformatf("lane %0d CNN output 0", l));
      host_mem_addr = D1; #1 check(host_mem_rdata, 32'(dout(l, 1)), $sformatf("lane %0d CNN output 1", l));
      host_mem_addr = Q;  #1 check(host_mem_rdata, n / d, $sformatf("lane %0d quotient", l));
      host_mem_addr = R;  #1 check(host_mem_rdata, n % d, $sformatf("lane %0d remainder", l));
      $display("lane %0d: x^5=%0d d0=%0d d1=%0d q=%0d r=%0d", l, x[l]**5, dout(l,0), dout(l,1), n/d, n%d);
    end
    check(32'(flushes), 32'(4 + 31), "taken loop branches");
    check(32'(stalls), 32'(1 + 64 * 2), "DNN cycles for two output channels");
    check(32'(run_cycles), 32'(1 + retired + flushes + stalls), "total cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
