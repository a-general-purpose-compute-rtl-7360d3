// tb_gpcim_top: end-to-end run of the processor at its default size.
//
// Follows the data-locality flow: the host leaves raw input bit-planes in
// DOMEM of every lane; a vector CPU program preprocesses them (inverts the
// pixels) and stores the CNN input straight into DAMEM; MVCSR configures a
// layer and SWITCH runs it in DNN mode, twice in a loop with the next weight
// rows and output rows; back in CPU mode the outputs are post-processed in
// place in DOMEM (ReLU, scaling, bias); PCS reads the layer counter; a few more
// instructions read DAMEM as data cache, count bits and multiply. Every value
// is compared with a reference computed here, and the cycle count of the DNN
// layers (64 cycles per output channel) is checked.
// Mechanisms counted (each must occur): CPU->DNN and DNN->CPU mode switches,
// SWITCH stall cycles, taken-branch flushes, CPU writes into DAMEM, CPU reads
// from DAMEM, DNN write-backs into DOMEM, MVCSR and PCS.
module tb_gpcim_top;
  import gpcim_pkg::*;
  localparam int LANES = 4;
  localparam int NOUT_LAYER = 4;

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int to_dnn, to_cpu, stalls, flushes, da_writes, da_reads, dnn_writes, mvcsr, pcs, run_cycles;
  mode_e mode_q;
  always @(posedge clk) begin
    mode_q <= mode;
    if (rst_n) begin
      if (mode == MODE_DNN && mode_q == MODE_CPU) to_dnn++;
      if (mode == MODE_CPU && mode_q == MODE_DNN) to_cpu++;
      if (dut.stall) stalls++;
      if (dut.flush) flushes++;
      if (dut.ex_fire && dut.ex.wr_vec && dut.ex.rd_loc == LOC_DAMEM) da_writes++;
      if (dut.ex_fire && dut.ex.cls != CLS_S && (dut.ex.rs1_loc == LOC_DAMEM || dut.ex.rs2_loc == LOC_DAMEM)) da_reads++;
      if (dut.dnn_wr) dnn_writes++;
      if (dut.csr_we) mvcsr++;
      if (dut.ex_fire && dut.ex.cls == CLS_S && dut.ex.sfunc == SF_PCS) pcs++;
      if (running) run_cycles++;
    end
  end

  // ---------------- program ----------------
  logic [31:0] prog [$];
  localparam logic [6:0] R_CNT = 7'd120, R_ZERO = 7'd121, R_WB = 7'd122, R_DOB = 7'd123;

  task automatic build_program();
    for (int p = 0; p < 8; p++)               // preprocess: invert pixels, store into DAMEM
      prog.push_back(enc_i(ALU_XOR, LOC_DAMEM, 7'(p), LOC_DOMEM, 7'(p), 9'h1FF));
    prog.push_back(enc_r(ALU_XOR, LOC_DOMEM, R_ZERO, LOC_DOMEM, R_ZERO, LOC_DOMEM, R_ZERO));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R_CNT, LOC_DOMEM, R_ZERO, 9'd2));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R_WB,  LOC_DOMEM, R_ZERO, 9'd0));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R_DOB, LOC_DOMEM, R_ZERO, 9'd64));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'd0, CSR_DA_BASE));
    prog.push_back(enc_s(SF_MVCSR, 0, 0, 1'b1, 7'(NOUT_LAYER), CSR_N_OUT));
    // loop (address 14)
    prog.push_back(enc_s(SF_MVCSR, 0, R_WB, 1'b0, 0, CSR_W_BASE));
    prog.push_back(enc_s(SF_MVCSR, 0, R_DOB, 1'b0, 0, CSR_DO_BASE));
    prog.push_back(enc_s(SF_SWITCH, 0, 0, 1'b0, 0, CSR_MODE));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R_WB,  LOC_DOMEM, R_WB,  9'(NOUT_LAYER)));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R_DOB, LOC_DOMEM, R_DOB, 9'(NOUT_LAYER)));
    prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, R_CNT, LOC_DOMEM, R_CNT, 9'h1FF));
    prog.push_back(enc_b(BR_NE, 7'd14, LOC_DOMEM, R_CNT, LOC_DOMEM, R_ZERO));
    // post-processing of the 8 outputs in DOMEM rows 64..71
    for (int o = 0; o < 8; o++) prog.push_back(enc_i(ALU_MAX, LOC_DOMEM, 7'(64+o), LOC_DOMEM, 7'(64+o), 9'd0));
    for (int o = 0; o < 8; o++) prog.push_back(enc_i(ALU_SRA, LOC_DOMEM, 7'(64+o), LOC_DOMEM, 7'(64+o), 9'd2));
    for (int o = 0; o < 8; o++) prog.push_back(enc_i(ALU_ADD, LOC_DOMEM, 7'(64+o), LOC_DOMEM, 7'(64+o), 9'd3));
    prog.push_back(enc_s(SF_PCS, 7'd80, 0, 1'b0, 0, CSR_DNN_DONE));
    prog.push_back(enc_r(ALU_ADD,  LOC_DOMEM, 7'd81, LOC_DAMEM, 7'd0, LOC_DOMEM, 7'd64));
    prog.push_back(enc_r(ALU_POPC, LOC_DOMEM, 7'd82, LOC_DAMEM, 7'd3, LOC_DOMEM, 7'd0));
    prog.push_back(enc_r(ALU_MUL,  LOC_DOMEM, 7'd83, LOC_DOMEM, 7'd64, LOC_DOMEM, 7'd65));
    prog.push_back(enc_s(SF_HALT, 0, 0, 1'b0, 0, CSR_MODE));
  endtask

  // ---------------- data and reference ----------------
  logic [31:0] raw [LANES][8];
  logic [7:0]  wt [8][32];

  function automatic logic [31:0] ref_out(int l, int o);
    int y;
    y = 0;
    for (int c = 0; c < 32; c++) begin
      logic [7:0] a;
      for (int b = 0; b < 8; b++) a[b] = ~raw[l][b][c];
      y += int'(a) * int'($signed(wt[o][c]));
    end
    if (y < 0) y = 0;
    return 32'((y >>> 2) + 3);
  endfunction

  initial begin
    rst_n = 0; start = 0; host_ic_we = 0; host_w_we = 0; host_mem_we = 0;
    host_ic_addr = 0; host_ic_wdata = 0; host_w_addr = 0; host_w_wdata = 0;
    host_mem_sel = LOC_DOMEM; host_mem_lane = 0; host_mem_addr = 0; host_mem_wdata = 0;
    to_dnn = 0; to_cpu = 0; stalls = 0; flushes = 0; da_writes = 0; da_reads = 0;
    dnn_writes = 0; mvcsr = 0; pcs = 0; run_cycles = 0;
    build_program();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load program
    foreach (prog[i]) begin
      @(negedge clk); host_ic_we = 1; host_ic_addr = 7'(i); host_ic_wdata = prog[i];
    end
    @(negedge clk); host_ic_we = 0;
    // load weights: output channel o in weight row o
    for (int o = 0; o < 8; o++) begin
      @(negedge clk);
      for (int c = 0; c < 32; c++) begin
        wt[o][c] = (o == 0) ? 8'sd100 : 8'($urandom);
        host_w_wdata[c*8 +: 8] = wt[o][c];
      end
      host_w_we = 1; host_w_addr = 6'(o);
    end
    @(negedge clk); host_w_we = 0;
    // raw bit-planes into DOMEM rows 0..7 of each lane
    for (int l = 0; l < LANES; l++)
      for (int b = 0; b < 8; b++) begin
        raw[l][b] = $urandom;
        @(negedge clk);
        host_mem_we = 1; host_mem_sel = LOC_DOMEM; host_mem_lane = 2'(l);
        host_mem_addr = 7'(b); host_mem_wdata = raw[l][b];
      end
    @(negedge clk); host_mem_we = 0;
    // run
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
    check(32'(error), 0, "no illegal instruction");
    // results
    for (int l = 0; l < LANES; l++) begin
      logic [31:0] z0, z1;
      host_mem_lane = 2'(l);
      for (int o = 0; o < 8; o++) begin
        host_mem_sel = LOC_DOMEM; host_mem_addr = 7'(64 + o); #1;
        check(host_mem_rdata, ref_out(l, o), $sformatf("lane %0d output %0d", l, o));
      end
      for (int b = 0; b < 8; b++) begin
        host_mem_sel = LOC_DAMEM; host_mem_addr = 7'(b); #1;
        check(host_mem_rdata, ~raw[l][b], $sformatf("lane %0d CNN input plane %0d in DAMEM", l, b));
      end
      z0 = ref_out(l, 0); z1 = ref_out(l, 1);
      host_mem_sel = LOC_DOMEM;
      host_mem_addr = 7'd80; #1 check(host_mem_rdata, 32'd2, "PCS of layer counter");
      host_mem_addr = 7'd81; #1 check(host_mem_rdata, ~raw[l][0] + z0, "DAMEM operand add");
      host_mem_addr = 7'd82; #1 check(host_mem_rdata, 32'($countones(~raw[l][3])), "POPC");
      host_mem_addr = 7'd83; #1 check(host_mem_rdata, z0 * z1, "MUL");
    end
    // timing: each SWITCH stalls for its start cycle plus 64 cycles per output channel
    check(32'(stalls), 32'(2 * (1 + 64 * NOUT_LAYER)), "DNN stall cycles");
    check(32'(flushes), 32'd1, "taken branches");
    check(32'(run_cycles), 32'(1 + (prog.size() + 7) + flushes + stalls), "total cycles");
    // mechanisms
    check(32'(to_dnn > 0), 1, "switch to DNN mode happened");
    check(32'(to_cpu > 0), 1, "return to CPU mode happened");
    check(32'(to_dnn), 32'd2, "two layers");
    check(32'(stalls > 0), 1, "stall happened");
    check(32'(flushes > 0), 1, "branch flush happened");
    check(32'(da_writes > 0), 1, "CPU store into DAMEM happened");
    check(32'(da_reads > 0), 1, "CPU read from DAMEM happened");
    check(32'(dnn_writes), 32'd8, "DNN write-backs");
    check(32'(mvcsr > 0), 1, "MVCSR happened");
    check(32'(pcs > 0), 1, "PCS happened");
    $display("mechanisms: to_dnn=%0d to_cpu=%0d stalls=%0d flushes=%0d da_writes=%0d da_reads=%0d dnn_writes=%0d mvcsr=%0d pcs=%0d cycles=%0d",
             to_dnn, to_cpu, stalls, flushes, da_writes, da_reads, dnn_writes, mvcsr, pcs, run_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
