// tb_cim_macro: one CIM macro in all three uses.
// Host: fills DAMEM and DOMEM with random data and reads it back.
// CPU mode: random instructions with random result/operand locations (never
// two DAMEM sources), register or immediate operands, checked against a
// reference copy of both memories; also the CSR-value write used by PCS.
// DNN mode: drives a full 64-step MAC over 8 bit-planes stored in DAMEM with
// random weights and checks the dot product that lands in DOMEM.
module tb_cim_macro;
  import gpcim_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  mode_e mode;
  loc_e rs1_loc, rs2_loc, rd_loc, host_sel;
  logic [6:0] rs1, rs2, rd, host_addr, dnn_da_addr, dnn_wa;
  logic use_imm, wr_en, wr_csr, host_en, host_we;
  logic [31:0] imm, csr_val, op_a, op_b, host_wdata, host_rdata, dnn_wbit;
  alu_op_e op;
  logic [3:0] dnn_shift;
  logic dnn_neg, dnn_acc_clr, dnn_acc_en, dnn_wr;
  int checks = 0, failures = 0;

  cim_macro #(.DA_ROWS(128), .DO_ROWS(128)) dut (.*);

  logic [31:0] da_ref [128];
  logic [31:0] do_ref [128];

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

  task automatic host_write(input loc_e sel, input logic [6:0] addr, input logic [31:0] d);
    @(negedge clk);
    host_en = 1; host_we = 1; host_sel = sel; host_addr = addr; host_wdata = d;
    @(negedge clk);
    host_we = 0;
    if (sel == LOC_DAMEM) da_ref[addr] = d; else do_ref[addr] = d;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; mode = MODE_CPU; rs1_loc = LOC_DOMEM; rs2_loc = LOC_DOMEM; rd_loc = LOC_DOMEM;
    rs1 = 0; rs2 = 0; rd = 0; use_imm = 0; imm = 0; op = ALU_ADD; wr_en = 0; wr_csr = 0; csr_val = 0;
    dnn_da_addr = 0; dnn_wbit = 0; dnn_shift = 0; dnn_neg = 0; dnn_acc_clr = 0; dnn_acc_en = 0;
    dnn_wr = 0; dnn_wa = 0; host_en = 1; host_we = 0; host_sel = LOC_DOMEM; host_addr = 0; host_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 128; r++) begin
      host_write(LOC_DAMEM, 7'(r), $urandom);
      host_write(LOC_DOMEM, 7'(r), $urandom);
    end
    for (int i = 0; i < 40; i++) begin
      host_sel = loc_e'(i % 2); host_addr = 7'($urandom); #1;
      check(host_rdata, (host_sel == LOC_DAMEM) ? da_ref[host_addr] : do_ref[host_addr], "host read");
    end
    // ---------------- CPU mode ----------------
    host_en = 0;
    for (int i = 0; i < 600; i++) begin
      logic [31:0] a, b, r;
      @(negedge clk);
      op = alu_op_e'($urandom % 14);
      rs1_loc = loc_e'($urandom % 2);
      rs2_loc = (rs1_loc == LOC_DAMEM) ? LOC_DOMEM : loc_e'($urandom % 2);
      rd_loc = loc_e'($urandom % 2);
      rs1 = 7'($urandom); rs2 = 7'($urandom); rd = 7'($urandom);
      use_imm = ($urandom % 3 == 0); imm = 32'($signed(9'($urandom)));
      wr_csr = (i % 50 == 7); csr_val = $urandom;
      a = (rs1_loc == LOC_DAMEM) ? da_ref[rs1] : do_ref[rs1];
      b = use_imm ? imm : ((rs2_loc == LOC_DAMEM) ? da_ref[rs2] : do_ref[rs2]);
      r = wr_csr ? csr_val : model(op, a, b);
      wr_en = 1;
      #1;
      check(op_a, a, "operand a");
      check(op_b, b, "operand b");
      @(posedge clk);
      if (rd_loc == LOC_DAMEM) da_ref[rd] = r; else do_ref[rd] = r;
    end
    @(negedge clk); wr_en = 0; wr_csr = 0; host_en = 1;
    for (int r = 0; r < 128; r++) begin
      host_sel = LOC_DAMEM; host_addr = 7'(r); #1 check(host_rdata, da_ref[r], "DAMEM after CPU run");
      host_sel = LOC_DOMEM; #1 check(host_rdata, do_ref[r], "DOMEM after CPU run");
    end
    // ---------------- DNN mode ----------------
    for (int t = 0; t < 4; t++) begin
      logic [7:0] act [32];
      logic [7:0] wt [32];
      int exp;
      exp = 0;
      for (int c = 0; c < 32; c++) begin
        act[c] = 8'($urandom); wt[c] = 8'($urandom);
        exp += int'(act[c]) * int'($signed(wt[c]));
      end
      for (int ib = 0; ib < 8; ib++) begin
        logic [31:0] plane;
        for (int c = 0; c < 32; c++) plane[c] = act[c][ib];
        host_write(LOC_DAMEM, 7'(96 + ib), plane);
      end
      @(negedge clk);
      host_en = 0; mode = MODE_DNN;
      for (int wb = 0; wb < 8; wb++)
        for (int ib = 0; ib < 8; ib++) begin
          dnn_da_addr = 7'(96 + ib);
          for (int c = 0; c < 32; c++) dnn_wbit[c] = wt[c][wb];
          dnn_shift = 4'(ib + wb); dnn_neg = (wb == 7); dnn_acc_clr = (ib == 0 && wb == 0);
          dnn_acc_en = 1; dnn_wr = (ib == 7 && wb == 7); dnn_wa = 7'(10 + t);
          // CPU-side write requests must be ignored in DNN mode.
          wr_en = 1; rd_loc = LOC_DAMEM; rd = 7'(96);
          @(negedge clk);
        end
      dnn_acc_en = 0; dnn_wr = 0; wr_en = 0; mode = MODE_CPU; host_en = 1;
      host_sel = LOC_DOMEM; host_addr = 7'(10 + t); #1;
      check(host_rdata, 32'(exp), "DNN dot product in DOMEM");
      host_sel = LOC_DAMEM; host_addr = 7'(96); #1;
      check(host_rdata, da_ref[96], "DAMEM untouched by CPU port in DNN mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
