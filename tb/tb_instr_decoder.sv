// tb_instr_decoder: builds random instructions of every class from their
// fields and checks each decoded field, the location bits, immediate sign
// extension and the rejection of illegal encodings.
module tb_instr_decoder;
  import gpcim_pkg::*;
  logic [31:0] instr;
  logic valid;
  dec_t dec;
  int checks = 0, failures = 0;

  instr_decoder dut (.*);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (instr %h)", what, got, exp, instr);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 1;
    for (int i = 0; i < 300; i++) begin
      logic [6:0] rd, r1, r2;
      loc_e l0, l1, l2;
      alu_op_e op;
      logic [8:0] imm;
      rd = 7'($urandom); r1 = 7'($urandom); r2 = 7'($urandom);
      l0 = loc_e'($urandom % 2); l1 = loc_e'($urandom % 2); l2 = loc_e'($urandom % 2);
      op = alu_op_e'($urandom % 14); imm = 9'($urandom);
      // R class
      instr = enc_r(op, l0, rd, l1, r1, l2, r2); #1;
      check(32'(dec.cls), 32'(CLS_R), "R class");
      check(32'(dec.rd_loc), 32'(l0), "R rd loc");
      check(32'(dec.rs1_loc), 32'(l1), "R rs1 loc");
      check(32'(dec.rs2_loc), 32'(l2), "R rs2 loc");
      check(32'(dec.rd), 32'(rd), "R rd");
      check(32'(dec.rs1), 32'(r1), "R rs1");
      check(32'(dec.rs2), 32'(r2), "R rs2");
      check(32'(dec.alu_op), 32'(op), "R op");
      check(32'(dec.use_imm), 0, "R no imm");
      check(32'(dec.wr_vec), 1, "R writes");
      check(32'(dec.illegal), 32'(l1 == LOC_DAMEM && l2 == LOC_DAMEM), "R two DAMEM sources illegal");
      // I class
      instr = enc_i(op, l0, rd, l1, r1, imm); #1;
      check(32'(dec.cls), 32'(CLS_I), "I class");
      check(32'(dec.alu_op), 32'(op), "I op");
      check(dec.imm, 32'($signed(imm)), "I imm sign extension");
      check(32'(dec.use_imm), 1, "I uses imm");
      check(32'(dec.rd_loc), 32'(l0), "I rd loc");
      check(32'(dec.rs1_loc), 32'(l1), "I rs1 loc");
      check(32'(dec.illegal), 0, "I legal");
      // B class
      instr = enc_b(br_cond_e'($urandom % 5), rd, l1, r1, LOC_DOMEM, r2); #1;
      check(32'(dec.branch), 1, "B branch");
      check(32'(dec.target), 32'(rd), "B target");
      check(32'(dec.cond), 32'(instr[2:0]), "B cond");
      check(32'(dec.wr_vec), 0, "B no write");
      check(32'(dec.illegal), 0, "B legal");
      // S class
      instr = enc_s(sfunc_e'($urandom % 5), rd, r1, 1'b1, 7'(imm), csr_e'($urandom % 8)); #1;
      check(32'(dec.cls), 32'(CLS_S), "S class");
      check(32'(dec.sfunc), 32'(instr[2:0]), "S func");
      check(32'(dec.csr), 32'(instr[5:3]), "S csr");
      check(dec.imm, 32'(imm[6:0]), "S imm7");
      check(32'(dec.use_imm), 1, "S imm select");
      check(32'(dec.wr_vec), 32'(instr[2:0] == 3'(SF_PCS)), "S only PCS writes");
    end
    instr = 32'h0000_000E; #1 check(32'(dec.illegal), 1, "R op 14 illegal");
    instr = enc_s(SF_NOP, 0, 0, 0, 0, CSR_MODE) | 32'h7; #1 check(32'(dec.illegal), 1, "S func 7 illegal");
    valid = 0; #1 check(32'(dec.illegal), 0, "bubble never illegal");
    check(32'(dec.valid), 0, "bubble not valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
