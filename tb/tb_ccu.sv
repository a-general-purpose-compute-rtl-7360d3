// tb_ccu: self-checking test of the central computing unit.
// CPU mode: random operands for every ALU operation against a reference
// model, plus corner values. DNN mode: random 8-bit unsigned activations
// (stored as bit-planes) and signed 8-bit weights over 32 channels; the 64-step
// bit-serial sequence must end with the exact dot product, in 64 cycles.
// Also checks input gating: the ALU result is zero in DNN mode.
module tb_ccu;
  import gpcim_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  mode_e mode;
  alu_op_e op;
  logic [31:0] a, b, y, acc_next, acc;
  logic [31:0] prod;
  logic [3:0] shift;
  logic neg, acc_clr, acc_en;
  int checks = 0, failures = 0;

  ccu #(.WIDTH(32)) dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_SLL:  return x << z[4:0];
      ALU_SRL:  return x >> z[4:0];
      ALU_SRA:  return 32'($signed(x) >>> z[4:0]);
      ALU_SLT:  return {31'b0, $signed(x) < $signed(z)};
      ALU_SLTU: return {31'b0, x < z};
      ALU_MUL:  return x * z;
      ALU_MIN:  return ($signed(x) < $signed(z)) ? x : z;
      ALU_MAX:  return ($signed(x) < $signed(z)) ? z : x;
      ALU_POPC: return 32'($countones(x));
      default:  return 32'h0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] act [32];
  logic signed [7:0] wt [32];

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    rst_n = 0; mode = MODE_CPU; op = ALU_ADD; a = 0; b = 0; prod = 0; shift = 0;
    neg = 0; acc_clr = 0; acc_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------- CPU mode ----------
    for (int o = 0; o <= 13; o++) begin
      op = alu_op_e'(o);
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          a = corner[i]; b = corner[j]; #1;
          check(y, model(op, a, b), $sformatf("op %s corner", op.name()));
        end
      for (int i = 0; i < 200; i++) begin
        a = $urandom; b = (i % 4 == 0) ? a : $urandom; #1;
        check(y, model(op, a, b), $sformatf("op %s", op.name()));
      end
    end
    // ---------- DNN mode ----------
    for (int t = 0; t < 20; t++) begin
      int exp, cycles;
      for (int c = 0; c < 32; c++) begin
        act[c] = (t == 0) ? 8'hFF : 8'($urandom);
        wt[c]  = (t == 0) ? -8'sd128 : (t == 1) ? 8'sd127 : 8'($urandom);
      end
      exp = 0;
      for (int c = 0; c < 32; c++) exp += int'(act[c]) * int'(wt[c]);
      @(negedge clk);
      mode = MODE_DNN; op = ALU_ADD; a = $urandom; b = $urandom;
      #1 check(y, 32'h0, "ALU gated in DNN mode");
      cycles = 0;
      for (int wb = 0; wb < 8; wb++)
        for (int ib = 0; ib < 8; ib++) begin
          for (int c = 0; c < 32; c++) prod[c] = act[c][ib] & wt[c][wb];
          shift = 4'(ib + wb); neg = (wb == 7); acc_clr = (ib == 0 && wb == 0); acc_en = 1;
          if (wb == 7 && ib == 7) begin
            #1 check(acc_next, 32'(exp), "MAC result on last step");
          end
          @(negedge clk);
          cycles++;
        end
      acc_en = 0;
      check(acc, 32'(exp), "MAC accumulator");
      check(32'(cycles), 32'd64, "MAC cycles per output");
      mode = MODE_CPU;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
