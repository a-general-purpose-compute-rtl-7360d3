// instr_decoder: decoder of the custom 32-bit vector instruction.
//
// Splits the 5-bit opcode into the three location bits (result, source 1,
// source 2: DOMEM or DAMEM) and the two class bits, and the rest of the word
// into the fields of that class (see gpcim_pkg for the layout). It also
// rejects what the memories cannot serve: both sources in DAMEM (one read per
// cycle) and unused function codes. A 5-bit opcode whose first three bits give
// the operand and result locations follows the published design; everything
// else of the encoding is this design's choice.
//
// Purely combinational.
module instr_decoder
  import gpcim_pkg::*;
(
  input  logic [XLEN-1:0] instr,
  input  logic            valid,
  output dec_t            dec
);
  always_comb begin
    dec         = '0;
    dec.valid   = valid;
    dec.rd_loc  = loc_e'(instr[31]);
    dec.rs1_loc = loc_e'(instr[30]);
    dec.rs2_loc = loc_e'(instr[29]);
    dec.cls     = iclass_e'(instr[28:27]);
    dec.rd      = instr[26:20];
    dec.rs1     = instr[19:13];
    dec.rs2     = instr[12:6];
    dec.target  = instr[26:20];
    dec.csr     = instr[5:3];
    dec.alu_op  = alu_op_e'(instr[3:0]);
    dec.cond    = br_cond_e'(instr[2:0]);
    dec.sfunc   = sfunc_e'(instr[2:0]);
    unique case (dec.cls)
      CLS_R: begin
        dec.wr_vec  = 1'b1;
        dec.illegal = (dec.rs1_loc == LOC_DAMEM) && (dec.rs2_loc == LOC_DAMEM) ||
                      (instr[3:0] > 4'd13) || (instr[5:4] != 2'b00);
      end
      CLS_I: begin
        dec.alu_op  = alu_op_e'(instr[12:9]);
        dec.use_imm = 1'b1;
        dec.rs2_loc = LOC_DOMEM;
        dec.imm     = XLEN'($signed(instr[8:0]));
        dec.wr_vec  = 1'b1;
        dec.illegal = (instr[12:9] > 4'd13) || instr[29];
      end
      CLS_B: begin
        dec.branch  = 1'b1;
        dec.illegal = (dec.rs1_loc == LOC_DAMEM) && (dec.rs2_loc == LOC_DAMEM) ||
                      (instr[2:0] > 3'd4) || instr[31];
      end
      CLS_S: begin
        dec.imm     = XLEN'(instr[12:6]);
        dec.use_imm = instr[29];
        dec.rs2_loc = LOC_DOMEM;
        dec.rd_loc  = LOC_DOMEM;
        dec.wr_vec  = (instr[2:0] == SF_PCS);
        dec.illegal = (instr[2:0] > 3'd4);
      end
      default: ;
    endcase
    if (!valid) dec.illegal = 1'b0;
  end
endmodule
