// tb_cpu_pipeline: runs small programs through the two-stage pipeline with a
// modelled instruction memory and a modelled DNN sequencer (busy for 10 cycles
// after each start). The lane-0 operand values seen by branches are the source
// row numbers, so branch outcomes are known in advance. Checks the order of
// retired instructions, that taken branches flush exactly one fetched
// instruction, that SWITCH stalls until the DNN layer ends, the total cycle
// count, HALT, and that an illegal instruction stops with an error.
module tb_cpu_pipeline;
  import gpcim_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start;
  logic [6:0] pc;
  logic [31:0] instr, op_a0, op_b0;
  logic dnn_busy;
  dec_t ex;
  logic ex_fire, stall, flush, dnn_start, running, halted, error;
  logic [31:0] prog [128];
  int checks = 0, failures = 0;
  int dnn_left;

  cpu_pipeline #(.IC_DEPTH(128)) dut (.*);

  assign instr = prog[pc];
  assign op_a0 = 32'(ex.rs1);
  assign op_b0 = 32'(ex.rs2);

  // DNN sequencer model: busy for 10 cycles from the cycle after start.
  always_ff @(posedge clk) begin
    if (!rst_n) dnn_left <= 0;
    else if (dnn_start) dnn_left <= 10;
    else if (dnn_left > 0) dnn_left <= dnn_left - 1;
  end
  assign dnn_busy = dnn_left > 0;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] tag(int n);
    return enc_i(ALU_ADD, LOC_DOMEM, 7'(n), LOC_DOMEM, 7'd0, 9'(n));
  endfunction

  int retired [$];
  int run_cycles, stalls, flushes, starts;

  always @(posedge clk) begin
    if (running) run_cycles++;
    if (stall) stalls++;
    if (flush) flushes++;
    if (dnn_start) starts++;
    if (ex_fire) retired.push_back(int'(ex.rd));
  end

  task automatic run();
    run_cycles = 0; stalls = 0; flushes = 0; starts = 0; retired.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
  endtask

  initial begin
    int exp_order [$];
    rst_n = 0; start = 0;
    for (int i = 0; i < 128; i++) prog[i] = enc_s(SF_HALT, 7'd127, 0, 0, 0, CSR_MODE);
    prog[0]  = tag(1);
    prog[1]  = tag(2);
    prog[2]  = enc_b(BR_EQ, 7'd5, LOC_DOMEM, 7'd3, LOC_DOMEM, 7'd3);   // taken
    prog[3]  = tag(3);
    prog[4]  = tag(4);
    prog[5]  = tag(5);
    prog[6]  = enc_s(SF_SWITCH, 7'd6, 0, 0, 0, CSR_MODE);
    prog[7]  = tag(7);
    prog[8]  = enc_b(BR_NE, 7'd11, LOC_DOMEM, 7'd8, LOC_DOMEM, 7'd8);   // not taken
    prog[9]  = tag(9);
    prog[10] = enc_b(BR_LT, 7'd12, LOC_DOMEM, 7'd10, LOC_DOMEM, 7'd20); // taken
    prog[11] = tag(11);
    prog[12] = enc_s(SF_HALT, 7'd12, 0, 0, 0, CSR_MODE);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run();
    exp_order = '{1, 2, 5, 5, 6, 7, 11, 9, 12, 12};
    // rd fields of the retired words: tag1, tag2, BEQ (target 5), tag5, SWITCH (rd 6),
    // tag7, BNE (target 11), tag9, BLT (target 12), HALT (rd 12)
    check(retired.size(), exp_order.size(), "instructions retired");
    for (int i = 0; i < exp_order.size() && i < retired.size(); i++)
      check(retired[i], exp_order[i], $sformatf("retire order %0d", i));
    check(flushes, 2, "taken branches");
    check(stalls, 11, "SWITCH stall cycles");
    check(starts, 1, "DNN starts");
    check(run_cycles, 1 + 10 + 2 + 11, "cycles from start to halt");
    check(int'(error), 0, "no error");
    // A jump back and an illegal instruction.
    prog[0] = tag(1);
    prog[1] = enc_b(BR_JMP, 7'd40, LOC_DOMEM, 0, LOC_DOMEM, 0);
    prog[40] = tag(40);
    prog[41] = enc_r(ALU_ADD, LOC_DOMEM, 7'd1, LOC_DAMEM, 7'd2, LOC_DAMEM, 7'd3);
    prog[42] = tag(42);
    run();
    check(int'(error), 1, "illegal instruction flagged");
    check(retired.size(), 3, "stops at illegal instruction");
    check(int'(running), 0, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
