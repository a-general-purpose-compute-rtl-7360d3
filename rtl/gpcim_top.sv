// gpcim_top: general-purpose compute-in-memory processor.
//
// LANES CIM macros work either as the lanes of a vector CPU or as a digital
// CIM engine for DNN layers, and keep their data in place when the mode
// changes. In CPU mode a two-stage pipeline fetches from the instruction
// cache and every lane executes the same instruction on its own DAMEM/DOMEM
// rows. The SWITCH instruction hands the macros to the DNN sequencer, which
// multiplies the input bit-planes left in DAMEM by the weights of the shared
// weight SRAM and writes the outputs to DOMEM, where the CPU picks them up
// again after the automatic return to CPU mode. MVCSR and PCS move values
// into and out of the control and status registers that configure a layer.
// This structure follows the published design; the lane count, the memory
// depths and the host load port are this design's choices.
//
// Host port: while the core is not running, host_ic_* loads instructions,
// host_w_* loads weight rows and host_mem_* writes or reads a DAMEM or DOMEM
// row of one lane (read data is combinational). A `start` pulse runs the
// program from PC 0 until HALT; `halted` then stays high, `error` marks an
// illegal instruction.
module gpcim_top
  import gpcim_pkg::*;
#(
  parameter int unsigned LANES    = 4,
  parameter int unsigned DA_ROWS  = 128,
  parameter int unsigned DO_ROWS  = 128,
  parameter int unsigned IC_DEPTH = 128,
  parameter int unsigned W_DEPTH  = 64,
  localparam int unsigned DA_AW   = $clog2(DA_ROWS),
  localparam int unsigned DO_AW   = $clog2(DO_ROWS),
  localparam int unsigned PC_W    = $clog2(IC_DEPTH),
  localparam int unsigned W_AW    = $clog2(W_DEPTH),
  localparam int unsigned LANE_W  = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned W_RW    = NCOL * WBITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              running,
  output logic              halted,
  output logic              error,
  output mode_e             mode,
  // host load port
  input  logic              host_ic_we,
  input  logic [PC_W-1:0]   host_ic_addr,
  input  logic [XLEN-1:0]   host_ic_wdata,
  input  logic              host_w_we,
  input  logic [W_AW-1:0]   host_w_addr,
  input  logic [W_RW-1:0]   host_w_wdata,
  input  logic              host_mem_we,
  input  loc_e              host_mem_sel,
  input  logic [LANE_W-1:0] host_mem_lane,
  input  logic [ADDR_W-1:0] host_mem_addr,
  input  logic [XLEN-1:0]   host_mem_wdata,
  output logic [XLEN-1:0]   host_mem_rdata
);
  // ---------------- instruction cache and pipeline ----------------
  logic [PC_W-1:0] pc;
  logic [XLEN-1:0] instr;
  dec_t            ex;
  logic            ex_fire, stall, flush, dnn_start;
  logic [XLEN-1:0] op_a [LANES];
  logic [XLEN-1:0] op_b [LANES];
  logic            dnn_busy, dnn_done;

  icache #(.DEPTH(IC_DEPTH)) u_icache (
    .clk  (clk),
    .we   (host_ic_we && !running),
    .waddr(host_ic_addr),
    .wdata(host_ic_wdata),
    .raddr(pc),
    .rdata(instr)
  );

  cpu_pipeline #(.IC_DEPTH(IC_DEPTH)) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .pc       (pc),
    .instr    (instr),
    .op_a0    (op_a[0]),
    .op_b0    (op_b[0]),
    .dnn_busy (dnn_busy),
    .ex       (ex),
    .ex_fire  (ex_fire),
    .stall    (stall),
    .flush    (flush),
    .dnn_start(dnn_start),
    .running  (running),
    .halted   (halted),
    .error    (error)
  );

  // ---------------- CSRs ----------------
  logic [DA_AW-1:0] da_base;
  logic [W_AW-1:0]  w_base;
  logic [DO_AW-1:0] do_base;
  logic [DO_AW:0]   n_out;
  logic [XLEN-1:0]  csr_rdata;
  logic             csr_we;

  assign csr_we = ex_fire && ex.cls == CLS_S && ex.sfunc == SF_MVCSR;

  csr_file #(.DA_AW(DA_AW), .W_AW(W_AW), .DO_AW(DO_AW)) u_csr (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (csr_we),
    .widx    (csr_e'(ex.csr)),
    .wdata   (ex.use_imm ? ex.imm : op_a[0]),
    .ridx    (csr_e'(ex.csr)),
    .rdata   (csr_rdata),
    .mode    (mode),
    .dnn_done(dnn_done),
    .da_base (da_base),
    .w_base  (w_base),
    .do_base (do_base),
    .n_out   (n_out)
  );

  // ---------------- DNN sequencer and weight SRAM ----------------
  logic [DA_AW-1:0] dnn_da_addr;
  logic [W_AW-1:0]  w_row;
  logic [2:0]       wsel;
  logic [3:0]       dnn_shift;
  logic             dnn_neg, dnn_acc_clr, dnn_acc_en, dnn_wr;
  logic [DO_AW-1:0] dnn_wa;
  logic [W_RW-1:0]  w_rdata;
  logic [NCOL-1:0]  wbit;

  dnn_ctrl #(.DA_AW(DA_AW), .W_AW(W_AW), .DO_AW(DO_AW)) u_dnn (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (dnn_start),
    .da_base(da_base),
    .w_base (w_base),
    .do_base(do_base),
    .n_out  (n_out),
    .busy   (dnn_busy),
    .done   (dnn_done),
    .mode   (mode),
    .da_addr(dnn_da_addr),
    .w_row  (w_row),
    .wsel   (wsel),
    .shift  (dnn_shift),
    .neg    (dnn_neg),
    .acc_clr(dnn_acc_clr),
    .acc_en (dnn_acc_en),
    .wr_en  (dnn_wr),
    .wr_addr(dnn_wa)
  );

  weight_sram #(.DEPTH(W_DEPTH), .COLS(NCOL), .WBITS(WBITS)) u_wsram (
    .clk  (clk),
    .we   (host_w_we && !running),
    .waddr(host_w_addr),
    .wdata(host_w_wdata),
    .raddr(w_row),
    .rdata(w_rdata)
  );

  // Bit `wsel` of every column's weight is that column's multiplier bit.
  always_comb begin
    for (int c = 0; c < NCOL; c++) wbit[c] = w_rdata[c*WBITS + int'(wsel)];
  end

  // ---------------- CIM macros (vector lanes) ----------------
  logic            lane_wr, wr_csr;
  logic [XLEN-1:0] host_rd [LANES];

  assign lane_wr = ex_fire && ex.wr_vec;
  assign wr_csr  = ex.cls == CLS_S && ex.sfunc == SF_PCS;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    cim_macro #(.DA_ROWS(DA_ROWS), .DO_ROWS(DO_ROWS)) u_macro (
      .clk        (clk),
      .rst_n      (rst_n),
      .mode       (mode),
      .rs1_loc    (ex.rs1_loc),
      .rs1        (ex.rs1),
      .rs2_loc    (ex.rs2_loc),
      .rs2        (ex.rs2),
      .use_imm    (ex.use_imm),
      .imm        (ex.imm),
      .op         (ex.alu_op),
      .wr_en      (lane_wr),
      .rd_loc     (ex.rd_loc),
      .rd         (ex.rd),
      .wr_csr     (wr_csr),
      .csr_val    (csr_rdata),
      .op_a       (op_a[l]),
      .op_b       (op_b[l]),
      .dnn_da_addr(dnn_da_addr),
      .dnn_wbit   (wbit),
      .dnn_shift  (dnn_shift),
      .dnn_neg    (dnn_neg),
      .dnn_acc_clr(dnn_acc_clr),
      .dnn_acc_en (dnn_acc_en),
      .dnn_wr     (dnn_wr),
      .dnn_wa     (dnn_wa),
      .host_en    (!running),
      .host_we    (host_mem_we && (LANES == 1 || host_mem_lane == LANE_W'(l))),
      .host_sel   (host_mem_sel),
      .host_addr  (host_mem_addr),
      .host_wdata (host_mem_wdata),
      .host_rdata (host_rd[l])
    );
  end

  assign host_mem_rdata = host_rd[host_mem_lane];

  // CPU and DNN never drive the macros at the same time.
  mode_exclusive: assert property (@(posedge clk) disable iff (!rst_n) dnn_busy |-> !ex_fire || !ex.wr_vec);
endmodule
