// tb_workload_classify: end-to-end image-classification flow on the default
// processor: 64 input pixels per lane (four images, one per lane), a fully
// connected layer with 8 classes, and the class decision on the vector CPU.
//
//  1. The host leaves raw pixels as 16 bit-planes in DOMEM (channels 0..31 in
//     rows 0..7, channels 32..63 in rows 8..15).
//  2. CPU preprocessing inverts the pixels and stores them into DAMEM rows
//     0..15, where the DNN mode reads them without any copy.
//  3. Two SWITCHes run the layer in two 32-channel passes (weights rows 0..7
//     and 8..15, outputs in DOMEM rows 64..71 and 72..79).
//  4. The CPU adds the partial sums, adds a per-class bias, applies ReLU and
//     finds the arg-max with branch-free vector code (first maximum wins).
// Scores and class index of every lane are checked against a reference
// model, and the DNN time against 64 cycles per output channel and pass.
module tb_workload_classify;
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

  int stalls, run_cycles;
  always @(posedge clk) begin
    if (rst_n && dut.stall) stalls++;
    if (rst_n && running) run_cycles++;
  end

  localparam logic [6:0] R_ZERO = 7'd121, R_BEST = 7'd90, R_IDX = 7'd91,
                         R_GT = 7'd92, R_MASK = 7'd93, R_T = 7'd94;
  logic [31:0] prog [$];
  int bias [8];

  task automatic build_program();
    for (int p = 0; p < 16; p++)
      prog.push_back(enc_i(ALU_XOR, LOC_DAMEM, 7'(p), LOC_DOMEM, 7'(p), 9'h1FF));
    prog.push_back(enc_r(ALU_XOR, LOC_DOMEM, R_ZERO, LOC_DOMEM, R_ZERO, LOC_DOMEM, R_ZERO));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'd8, CSR_N_OUT));
    for (int pass = 0; pass < 2; pass++) begin
      prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'(8 * pass), CSR_DA_BASE));
      prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'(8 * pass), CSR_W_BASE));
      prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'(64 + 8 * pass), CSR_DO_BASE));
      prog.push_back(enc_s(SF_SWITCH, 0, 0, 1'b0, 0, CSR_MODE));
    end
    for (int o = 0; o < 8; o++)
      prog.push_back(enc_r(ALU_ADD, LOC_DOMEM, 7'(64+o), LOC_DOMEM, 7'(64+o), LOC_DOMEM, 7'(72+o)));
    for (int o = 0; o < 8; o++)
      prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, 7'(64+o), LOC_DOMEM, 7'(64+o), 9'(bias[o])));
    for (int o = 0; o < 8; o++)
      prog.push_back(enc_i(ALU_MAX, LOC_DOMEM, 7'(64+o), LOC_DOMEM, 7'(64+o), 9'd0));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R_BEST, LOC_DOMEM, 7'd64, 9'd0));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R_IDX, LOC_DOMEM, R_ZERO, 9'd0));
    for (int o = 1; o < 8; o++) begin
      prog.push_back(enc_r(ALU_SLT, LOC_DOMEM, R_GT, LOC_DOMEM, R_BEST, LOC_DOMEM, 7'(64+o)));
      prog.push_back(enc_r(ALU_SUB, LOC_DOMEM, R_MASK, LOC_DOMEM, R_ZERO, LOC_DOMEM, R_GT));
      prog.push_back(enc_r(ALU_MAX, LOC_DOMEM, R_BEST, LOC_DOMEM, R_BEST, LOC_DOMEM, 7'(64+o)));
      prog.push_back(enc_i(ALU_XOR, LOC_DOMEM, R_T, LOC_DOMEM, R_IDX, 9'(o)));
      prog.push_back(enc_r(ALU_AND, LOC_DOMEM, R_T, LOC_DOMEM, R_T, LOC_DOMEM, R_MASK));
      prog.push_back(enc_r(ALU_XOR, LOC_DOMEM, R_IDX, LOC_DOMEM, R_IDX, LOC_DOMEM, R_T));
    end
    prog.push_back(enc_s(SF_HALT, 0, 0, 1'b0, 0, CSR_MODE));
  endtask

  logic [31:0] raw [LANES][16];
  logic [7:0]  wt [16][32];

  function automatic int score(int l, int o);
    int y;
    y = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int c = 0; c < 32; c++) begin
        logic [7:0] a;
        for (int b = 0; b < 8; b++) a[b] = ~raw[l][8*pass + b][c];
        y += int'(a) * int'($signed(wt[8*pass + o][c]));
      end
    y += bias[o];
    return (y < 0) ? 0 : y;
  endfunction

  initial begin
    rst_n = 0; start = 0; host_ic_we = 0; host_w_we = 0; host_mem_we = 0;
    host_ic_addr = 0; host_ic_wdata = 0; host_w_addr = 0; host_w_wdata = 0;
    host_mem_sel = LOC_DOMEM; host_mem_lane = 0; host_mem_addr = 0; host_mem_wdata = 0;
    stalls = 0; run_cycles = 0;
    for (int o = 0; o < 8; o++) bias[o] = int'($signed(9'($urandom)));
    build_program();
    check(32'(prog.size() <= 128), 1, "program fits the instruction cache");
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); host_ic_we = 1; host_ic_addr = 7'(i); host_ic_wdata = prog[i];
    end
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      host_ic_we = 0;
      for (int c = 0; c < 32; c++) begin
        wt[r][c] = 8'($urandom);
        host_w_wdata[c*8 +: 8] = wt[r][c];
      end
      host_w_we = 1; host_w_addr = 6'(r);
    end
    for (int l = 0; l < LANES; l++)
      for (int b = 0; b < 16; b++) begin
        @(negedge clk);
        host_w_we = 0;
        raw[l][b] = $urandom;
        host_mem_we = 1; host_mem_sel = LOC_DOMEM; host_mem_lane = 2'(l);
        host_mem_addr = 7'(b); host_mem_wdata = raw[l][b];
      end
    @(negedge clk); host_mem_we = 0; start = 1;
    @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
    check(32'(error), 0, "no illegal instruction");
    for (int l = 0; l < LANES; l++) begin
      int best, idx;
      best = score(l, 0); idx = 0;
      for (int o = 1; o < 8; o++)
        if (score(l, o) > best) begin best = score(l, o); idx = o; end
      host_mem_lane = 2'(l); host_mem_sel = LOC_DOMEM;
      for (int o = 0; o < 8; o++) begin
        host_mem_addr = 7'(64 + o); #1;
        check(host_mem_rdata, 32'(score(l, o)), $sformatf("lane %0d class score %0d", l, o));
      end
      host_mem_addr = R_IDX;  #1 check(host_mem_rdata, 32'(idx), $sformatf("lane %0d predicted class", l));
      host_mem_addr = R_BEST; #1 check(host_mem_rdata, 32'(best), $sformatf("lane %0d best score", l));
      $display("lane %0d: class %0d score %0d", l, idx, best);
    end
    check(32'(stalls), 32'(2 * (1 + 64 * 8)), "DNN cycles: 64 per output channel and pass");
    check(32'(run_cycles), 32'(1 + prog.size() + stalls), "total cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
