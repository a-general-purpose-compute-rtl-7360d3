// tb_dnn_ctrl: starts the DNN sequencer with random layer configurations and
// follows every cycle against the expected loop: bit-plane address, weight row
// and bit, shift, sign, accumulator clear, write-back address, and the length
// of 64 cycles per output channel. Also checks an empty layer finishes at once.
module tb_dnn_ctrl;
  import gpcim_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, neg, acc_clr, acc_en, wr_en;
  logic [6:0] da_base, do_base, da_addr, wr_addr;
  logic [5:0] w_base, w_row;
  logic [7:0] n_out;
  logic [2:0] wsel;
  logic [3:0] shift;
  mode_e mode;
  int checks = 0, failures = 0;

  dnn_ctrl #(.DA_AW(7), .W_AW(6), .DO_AW(7)) dut (.*);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; da_base = 0; do_base = 0; w_base = 0; n_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int n, busy_cycles, writes, dones;
      n = (t == 0) ? 1 : 1 + ($urandom % 6);
      da_base = 7'($urandom % 100); w_base = 6'($urandom % 50); do_base = 7'($urandom % 100);
      n_out = 8'(n);
      @(negedge clk); start = 1;
      #1 check(int'(busy), 0, "idle at start");
      @(negedge clk); start = 0;
      busy_cycles = 0; writes = 0; dones = 0;
      for (int o = 0; o < n; o++)
        for (int wb = 0; wb < 8; wb++)
          for (int ib = 0; ib < 8; ib++) begin
            check(int'(busy), 1, "busy");
            check(int'(mode), int'(MODE_DNN), "DNN mode");
            check(int'(da_addr), int'(7'(da_base + ib)), "bit-plane row");
            check(int'(w_row), int'(6'(w_base + o)), "weight row");
            check(int'(wsel), wb, "weight bit");
            check(int'(shift), ib + wb, "shift");
            check(int'(neg), int'(wb == 7), "sign step");
            check(int'(acc_clr), int'(ib == 0 && wb == 0), "clear");
            check(int'(acc_en), 1, "accumulate");
            check(int'(wr_en), int'(ib == 7 && wb == 7), "write step");
            if (wr_en) begin
              writes++;
              check(int'(wr_addr), int'(7'(do_base + o)), "write row");
            end
            if (done) dones++;
            busy_cycles++;
            @(negedge clk);
          end
      check(int'(busy), 0, "back to CPU mode");
      check(int'(mode), int'(MODE_CPU), "CPU mode");
      check(busy_cycles, 64 * n, "cycles per layer");
      check(writes, n, "writes per layer");
      check(dones, 1, "one done pulse");
      repeat (3) @(negedge clk);
    end
    n_out = 0;
    @(negedge clk); start = 1; #1 check(int'(done), 1, "empty layer done at once");
    @(negedge clk); start = 0; #1 check(int'(busy), 0, "empty layer never busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
