// dnn_ctrl: sequencer of the DNN mode.
//
// Started by the SWITCH instruction with the layer configuration of the CSRs,
// it computes n_out output channels. For each channel it walks the 8 weight
// bits (outer) and the 8 input bit-planes in DAMEM (inner): each cycle it
// addresses one bit-plane row, selects one bit of each weight as the column
// multiplier bit, and tells every CCU by how much to shift the column count and
// whether to subtract it (weight sign bit). On the 64th cycle of a channel the
// finished sum is written into DOMEM at do_base + channel. When all channels
// are done the processor returns to CPU mode by itself.
// DAMEM as stationary input memory, DOMEM as output memory and CSR-driven mode
// switching follow the published design; the loop order and the cycle count
// are this design's choice.
//
// Timing: `start` is a one-cycle pulse; `busy` (= DNN mode) is high from the
// next cycle for exactly 64 * n_out cycles, `done` pulses in the last of them.
module dnn_ctrl
  import gpcim_pkg::*;
#(
  parameter int unsigned DA_AW = 7,
  parameter int unsigned W_AW  = 6,
  parameter int unsigned DO_AW = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DA_AW-1:0] da_base,
  input  logic [W_AW-1:0]  w_base,
  input  logic [DO_AW-1:0] do_base,
  input  logic [DO_AW:0]   n_out,
  output logic             busy,
  output logic             done,
  output mode_e            mode,
  output logic [DA_AW-1:0] da_addr,
  output logic [W_AW-1:0]  w_row,
  output logic [2:0]       wsel,
  output logic [3:0]       shift,
  output logic             neg,
  output logic             acc_clr,
  output logic             acc_en,
  output logic             wr_en,
  output logic [DO_AW-1:0] wr_addr
);
  logic [2:0]     ib, wb;
  logic [DO_AW:0] oc, n_lat;
  logic [DA_AW-1:0] da_b;
  logic [W_AW-1:0]  w_b;
  logic [DO_AW-1:0] do_b;
  logic last_step;

  assign last_step = (ib == 3'(ABITS-1)) && (wb == 3'(WBITS-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ib    <= '0;
      wb    <= '0;
      oc    <= '0;
      n_lat <= '0;
      da_b  <= '0;
      w_b   <= '0;
      do_b  <= '0;
    end else if (!busy) begin
      if (start && n_out != 0) begin
        busy  <= 1'b1;
        ib    <= '0;
        wb    <= '0;
        oc    <= '0;
        n_lat <= n_out;
        da_b  <= da_base;
        w_b   <= w_base;
        do_b  <= do_base;
      end
    end else begin
      ib <= ib + 1'b1;
      if (ib == 3'(ABITS-1)) wb <= wb + 1'b1;
      if (last_step) begin
        oc <= oc + 1'b1;
        if (oc == n_lat - 1'b1) busy <= 1'b0;
      end
    end
  end

  assign mode    = busy ? MODE_DNN : MODE_CPU;
  assign da_addr = da_b + DA_AW'(ib);
  assign w_row   = w_b + W_AW'(oc);
  assign wsel    = wb;
  assign shift   = 4'(ib) + 4'(wb);
  assign neg     = busy && (wb == 3'(WBITS-1));
  assign acc_clr = busy && (ib == 0) && (wb == 0);
  assign acc_en  = busy;
  assign wr_en   = busy && last_step;
  assign wr_addr = do_b + DO_AW'(oc);
  // A layer with no output channels finishes at once.
  assign done    = (busy && last_step && (oc == n_lat - 1'b1)) || (!busy && start && n_out == 0);

  // SWITCH only issues while the sequencer is idle.
  start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
