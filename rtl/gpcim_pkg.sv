// gpcim_pkg: types and constants shared by the GPCIM processor.
//
// The processor runs a custom 32-bit vector ISA. Every instruction carries a
// 5-bit opcode in bits [31:27]; its first three bits say where the result and
// the two operands live (DOMEM or DAMEM of each CIM macro), the last two give
// the instruction class. The 5-bit opcode with location bits follows the
// published description; the field layout, the ALU function codes, the branch
// conditions and the CSR map below are this design's own choices.
//
//   class 00 (R):  [26:20] rd  [19:13] rs1 [12:6] rs2 [3:0] alu op
//   class 01 (I):  [26:20] rd  [19:13] rs1 [12:9] alu op [8:0] signed imm
//   class 10 (B):  [26:20] target PC [19:13] rs1 [12:6] rs2 [2:0] condition
//   class 11 (S):  [26:20] rd  [19:13] rs1 [12:6] imm7 [5:3] csr [2:0] sfunc
//
// Location bits: opcode[4] result, opcode[3] source 1, opcode[2] source 2;
// 0 selects DOMEM (register file / data cache), 1 selects DAMEM (data cache).
package gpcim_pkg;

  localparam int unsigned XLEN     = 32;  // data word and instruction width
  localparam int unsigned ADDR_W   = 7;   // row address field width
  localparam int unsigned NCOL     = 32;  // DAMEM columns = input channels per MAC
  localparam int unsigned NTREE    = 4;   // adder trees in the CCU
  localparam int unsigned ABITS    = 8;   // activation bits (bit-planes)
  localparam int unsigned WBITS    = 8;   // weight bits
  localparam int unsigned CSR_IDX_W = 3;

  typedef enum logic [1:0] {
    CLS_R = 2'b00,
    CLS_I = 2'b01,
    CLS_B = 2'b10,
    CLS_S = 2'b11
  } iclass_e;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_SLL  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_SLT  = 4'd8,
    ALU_SLTU = 4'd9,
    ALU_MUL  = 4'd10,
    ALU_MIN  = 4'd11,
    ALU_MAX  = 4'd12,
    ALU_POPC = 4'd13,
    ALU_R14  = 4'd14,
    ALU_R15  = 4'd15
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_JMP = 3'd0,
    BR_EQ  = 3'd1,
    BR_NE  = 3'd2,
    BR_LT  = 3'd3,
    BR_GE  = 3'd4
  } br_cond_e;

  typedef enum logic [2:0] {
    SF_NOP    = 3'd0,
    SF_MVCSR  = 3'd1,  // CSR[csr] <= lane-0 rs1 value, or imm7 when opcode[2] is set
    SF_SWITCH = 3'd2,  // enter DNN mode with the CSR configuration, stall until done
    SF_PCS    = 3'd3,  // put CSR[csr] into row rd of every lane
    SF_HALT   = 3'd4
  } sfunc_e;

  typedef enum logic [2:0] {
    CSR_MODE     = 3'd0,  // read-only: 0 CPU, 1 DNN
    CSR_DA_BASE  = 3'd1,  // DAMEM row of input bit-plane 0
    CSR_W_BASE   = 3'd2,  // weight SRAM row of output channel 0
    CSR_DO_BASE  = 3'd3,  // DOMEM row of output channel 0
    CSR_N_OUT    = 3'd4,  // number of output channels
    CSR_DNN_DONE = 3'd5,  // read-only: DNN layers completed
    CSR_CYCLE    = 3'd6,  // read-only: cycles since reset
    CSR_SCRATCH  = 3'd7
  } csr_e;

  typedef enum logic {
    MODE_CPU = 1'b0,
    MODE_DNN = 1'b1
  } mode_e;

  // Memory selected by an opcode location bit.
  typedef enum logic {
    LOC_DOMEM = 1'b0,
    LOC_DAMEM = 1'b1
  } loc_e;

  typedef struct packed {
    logic               valid;     // a real instruction (not a bubble)
    iclass_e            cls;
    loc_e               rd_loc;
    loc_e               rs1_loc;
    loc_e               rs2_loc;
    logic [ADDR_W-1:0]  rd;
    logic [ADDR_W-1:0]  rs1;
    logic [ADDR_W-1:0]  rs2;
    alu_op_e            alu_op;
    logic               use_imm;   // operand b is the immediate
    logic [XLEN-1:0]    imm;
    logic               wr_vec;    // writes the ALU result to every lane
    logic               branch;
    br_cond_e           cond;
    logic [ADDR_W-1:0]  target;
    sfunc_e             sfunc;
    logic [CSR_IDX_W-1:0] csr;
    logic               illegal;
  } dec_t;

  // Instruction encoders, used by testbenches to build programs.
  function automatic logic [XLEN-1:0] enc_r(input alu_op_e op, input loc_e rdl, input logic [6:0] rd,
                                            input loc_e s1l, input logic [6:0] rs1,
                                            input loc_e s2l, input logic [6:0] rs2);
    return {rdl, s1l, s2l, CLS_R, rd, rs1, rs2, 2'b00, op};
  endfunction

  function automatic logic [XLEN-1:0] enc_i(input alu_op_e op, input loc_e rdl, input logic [6:0] rd,
                                            input loc_e s1l, input logic [6:0] rs1,
                                            input logic [8:0] imm);
    return {rdl, s1l, 1'b0, CLS_I, rd, rs1, op, imm};
  endfunction

  function automatic logic [XLEN-1:0] enc_b(input br_cond_e c, input logic [6:0] target,
                                            input loc_e s1l, input logic [6:0] rs1,
                                            input loc_e s2l, input logic [6:0] rs2);
    return {1'b0, s1l, s2l, CLS_B, target, rs1, rs2, 3'b000, c};
  endfunction

  function automatic logic [XLEN-1:0] enc_s(input sfunc_e f, input logic [6:0] rd, input logic [6:0] rs1,
                                            input logic imm_sel, input logic [6:0] imm7,
                                            input csr_e c);
    return {1'b0, 1'b0, imm_sel, CLS_S, rd, rs1, imm7, c, f};
  endfunction

endpackage
