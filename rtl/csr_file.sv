// csr_file: control and status registers of the GPCIM processor.
//
// Holds the configuration of a DNN layer (where the input bit-planes start in
// DAMEM, where its weights start in the weight SRAM, where outputs go in
// DOMEM and how many output channels it has) plus status: the current mode,
// the number of DNN layers completed and a cycle counter. MVCSR writes a
// register, PCS reads one out. CSRs configured by dedicated instructions for
// switching between CPU and DNN mode follow the published design; the
// register map (gpcim_pkg::csr_e) is this design's choice.
//
// Timing: writes at the rising edge, reads combinational. Writes to the
// read-only MODE, DNN_DONE and CYCLE registers are ignored.
module csr_file
  import gpcim_pkg::*;
#(
  parameter int unsigned DA_AW = 7,
  parameter int unsigned W_AW  = 6,
  parameter int unsigned DO_AW = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  csr_e                 widx,
  input  logic [XLEN-1:0]      wdata,
  input  csr_e                 ridx,
  output logic [XLEN-1:0]      rdata,
  input  mode_e                mode,
  input  logic                 dnn_done,   // one pulse per completed layer
  output logic [DA_AW-1:0]     da_base,
  output logic [W_AW-1:0]      w_base,
  output logic [DO_AW-1:0]     do_base,
  output logic [DO_AW:0]       n_out
);
  logic [XLEN-1:0] done_cnt, cycle_cnt, scratch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      da_base   <= '0;
      w_base    <= '0;
      do_base   <= '0;
      n_out     <= '0;
      done_cnt  <= '0;
      cycle_cnt <= '0;
      scratch   <= '0;
    end else begin
      cycle_cnt <= cycle_cnt + 1'b1;
      if (dnn_done) done_cnt <= done_cnt + 1'b1;
      if (we) begin
        unique case (widx)
          CSR_DA_BASE: da_base <= wdata[DA_AW-1:0];
          CSR_W_BASE:  w_base  <= wdata[W_AW-1:0];
          CSR_DO_BASE: do_base <= wdata[DO_AW-1:0];
          CSR_N_OUT:   n_out   <= wdata[DO_AW:0];
          CSR_SCRATCH: scratch <= wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (ridx)
      CSR_MODE:     rdata = XLEN'(mode);
      CSR_DA_BASE:  rdata = XLEN'(da_base);
      CSR_W_BASE:   rdata = XLEN'(w_base);
      CSR_DO_BASE:  rdata = XLEN'(do_base);
      CSR_N_OUT:    rdata = XLEN'(n_out);
      CSR_DNN_DONE: rdata = done_cnt;
      CSR_CYCLE:    rdata = cycle_cnt;
      CSR_SCRATCH:  rdata = scratch;
      default:      rdata = '0;
    endcase
  end
endmodule
