// cim_macro: one compute-in-memory macro, which is one lane of the vector CPU.
//
// It joins DAMEM, DOMEM and the CCU and steers their ports by mode:
//  - CPU mode: an instruction's sources come from DOMEM (two read ports) or
//    DAMEM (one read port) as its location bits say; the CCU computes, and the
//    result (or a CSR value for PCS) is written back to DOMEM or DAMEM at the
//    clock edge. DAMEM is a data cache, DOMEM both register file and cache.
//  - DNN mode: DAMEM is read at the sequencer's bit-plane row with the
//    broadcast weight bits as column multipliers; the CCU accumulates and the
//    finished sum is written into DOMEM.
//  - Host access (core idle): a load port writes either memory and reads a
//    row back, for loading data and reading results.
// Reuse of DAMEM and DOMEM across modes follows the published design; the
// port steering and host access are this design's choice.
module cim_macro
  import gpcim_pkg::*;
#(
  parameter int unsigned DA_ROWS = 128,
  parameter int unsigned DO_ROWS = 128,
  localparam int unsigned DA_AW  = $clog2(DA_ROWS),
  localparam int unsigned DO_AW  = $clog2(DO_ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  // CPU side (stage 2 of the pipeline)
  input  loc_e             rs1_loc,
  input  logic [ADDR_W-1:0] rs1,
  input  loc_e             rs2_loc,
  input  logic [ADDR_W-1:0] rs2,
  input  logic             use_imm,
  input  logic [XLEN-1:0]  imm,
  input  alu_op_e          op,
  input  logic             wr_en,
  input  loc_e             rd_loc,
  input  logic [ADDR_W-1:0] rd,
  input  logic             wr_csr,    // write csr_val instead of the ALU result
  input  logic [XLEN-1:0]  csr_val,
  output logic [XLEN-1:0]  op_a,
  output logic [XLEN-1:0]  op_b,
  // DNN side
  input  logic [DA_AW-1:0] dnn_da_addr,
  input  logic [NCOL-1:0]  dnn_wbit,
  input  logic [3:0]       dnn_shift,
  input  logic             dnn_neg,
  input  logic             dnn_acc_clr,
  input  logic             dnn_acc_en,
  input  logic             dnn_wr,
  input  logic [DO_AW-1:0] dnn_wa,
  // host side
  input  logic             host_en,
  input  logic             host_we,
  input  loc_e             host_sel,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [XLEN-1:0]  host_wdata,
  output logic [XLEN-1:0]  host_rdata
);
  logic             dnn;
  assign dnn = (mode == MODE_DNN);

  // ---------------- DAMEM ----------------
  logic             da_we;
  logic [DA_AW-1:0] da_wa, da_ra;
  logic [XLEN-1:0]  da_wd, da_rd;
  logic [NCOL-1:0]  prod;
  logic [XLEN-1:0]  result;

  always_comb begin
    if (host_en)                   da_ra = DA_AW'(host_addr);
    else if (dnn)                  da_ra = dnn_da_addr;
    else if (rs1_loc == LOC_DAMEM) da_ra = DA_AW'(rs1);
    else                           da_ra = DA_AW'(rs2);
  end

  always_comb begin
    if (host_en) begin
      da_we = host_we && host_sel == LOC_DAMEM;
      da_wa = DA_AW'(host_addr);
      da_wd = host_wdata;
    end else begin
      da_we = !dnn && wr_en && rd_loc == LOC_DAMEM;
      da_wa = DA_AW'(rd);
      da_wd = result;
    end
  end

  damem #(.ROWS(DA_ROWS), .WIDTH(XLEN)) u_damem (
    .clk  (clk),
    .we   (da_we),
    .waddr(da_wa),
    .wdata(da_wd),
    .raddr(da_ra),
    .rdata(da_rd),
    .wbit (dnn ? dnn_wbit : '0),
    .prod (prod)
  );

  // ---------------- DOMEM ----------------
  logic             do_we;
  logic [DO_AW-1:0] do_wa, do_ra1;
  logic [XLEN-1:0]  do_wd, do_rd1, do_rd2, acc_next, acc;

  assign do_ra1 = host_en ? DO_AW'(host_addr) : DO_AW'(rs1);

  always_comb begin
    if (host_en) begin
      do_we = host_we && host_sel == LOC_DOMEM;
      do_wa = DO_AW'(host_addr);
      do_wd = host_wdata;
    end else if (dnn) begin
      do_we = dnn_wr;
      do_wa = dnn_wa;
      do_wd = acc_next;
    end else begin
      do_we = wr_en && rd_loc == LOC_DOMEM;
      do_wa = DO_AW'(rd);
      do_wd = result;
    end
  end

  domem #(.ROWS(DO_ROWS), .WIDTH(XLEN)) u_domem (
    .clk(clk),
    .ra1(do_ra1),
    .rd1(do_rd1),
    .ra2(DO_AW'(rs2)),
    .rd2(do_rd2),
    .we (do_we),
    .wa (do_wa),
    .wd (do_wd)
  );

  // ---------------- CCU ----------------
  logic [XLEN-1:0] y;

  assign op_a = (rs1_loc == LOC_DAMEM) ? da_rd : do_rd1;
  assign op_b = use_imm ? imm : ((rs2_loc == LOC_DAMEM) ? da_rd : do_rd2);
  assign result = wr_csr ? csr_val : y;
  assign host_rdata = (host_sel == LOC_DAMEM) ? da_rd : do_rd1;

  ccu #(.WIDTH(XLEN)) u_ccu (
    .clk     (clk),
    .rst_n   (rst_n),
    .mode    (mode),
    .op      (op),
    .a       (op_a),
    .b       (op_b),
    .y       (y),
    .prod    (prod),
    .shift   (dnn_shift),
    .neg     (dnn_neg),
    .acc_clr (dnn_acc_clr),
    .acc_en  (dnn_acc_en),
    .acc_next(acc_next),
    .acc     (acc)
  );

endmodule
