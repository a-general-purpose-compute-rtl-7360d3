// cpu_pipeline: the two-stage pipeline of the vector CPU.
//
// Stage 1 fetches the instruction at PC from the instruction cache into a
// register. Stage 2 decodes it and, in the same cycle, reads its operands from
// the CIM macros, executes it in the CCUs and writes the result back at the
// clock edge. Because the write lands before the next instruction reads, no
// forwarding is needed and there are no data hazards. Branches compare the
// lane-0 operand values and are resolved in stage 2; a taken branch flushes
// the one instruction fetched behind it. SWITCH starts the DNN sequencer and
// holds both stages until the DNN layer is done. HALT, or an illegal
// instruction (which also sets `error`), stops the pipeline.
// The two stages, the single-cycle execute from the CIM memories and the
// absence of forwarding follow the published design; branch, stall and halt
// handling are this design's choice.
//
// Interface: `start` (pulse, while not running) restarts at PC 0. `ex` is the
// decoded stage-2 instruction and `ex_fire` says it retires this cycle (its
// writes may happen). `dnn_start` pulses once per SWITCH.
module cpu_pipeline
  import gpcim_pkg::*;
#(
  parameter int unsigned IC_DEPTH = 128,
  localparam int unsigned PC_W    = $clog2(IC_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic [PC_W-1:0] pc,
  input  logic [XLEN-1:0] instr,
  input  logic [XLEN-1:0] op_a0,     // lane-0 source 1 value
  input  logic [XLEN-1:0] op_b0,     // lane-0 source 2 value
  input  logic            dnn_busy,
  output dec_t            ex,
  output logic            ex_fire,
  output logic            stall,
  output logic            flush,
  output logic            dnn_start,
  output logic            running,
  output logic            halted,
  output logic            error
);
  logic [XLEN-1:0] if_instr;
  logic            if_valid;
  logic            sw_wait;     // SWITCH issued, waiting for the DNN layer
  logic            taken;

  instr_decoder u_dec (
    .instr(if_instr),
    .valid(if_valid && running),
    .dec  (ex)
  );

  // Stall: a SWITCH in stage 2 waits for the sequencer to start and finish.
  logic is_switch;
  assign is_switch = ex.valid && !ex.illegal && ex.cls == CLS_S && ex.sfunc == SF_SWITCH;
  assign dnn_start = is_switch && !sw_wait;
  assign stall     = is_switch && (!sw_wait || dnn_busy);
  assign ex_fire   = ex.valid && !ex.illegal && !stall;

  always_comb begin
    unique case (ex.cond)
      BR_JMP:  taken = 1'b1;
      BR_EQ:   taken = (op_a0 == op_b0);
      BR_NE:   taken = (op_a0 != op_b0);
      BR_LT:   taken = ($signed(op_a0) <  $signed(op_b0));
      BR_GE:   taken = ($signed(op_a0) >= $signed(op_b0));
      default: taken = 1'b0;
    endcase
  end
  assign flush = ex_fire && ex.branch && taken;

  logic stop;
  assign stop = ex.valid && (ex.illegal || (ex.cls == CLS_S && ex.sfunc == SF_HALT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      if_instr <= '0;
      if_valid <= 1'b0;
      running  <= 1'b0;
      halted   <= 1'b0;
      error    <= 1'b0;
      sw_wait  <= 1'b0;
    end else if (!running) begin
      if (start) begin
        pc       <= '0;
        if_valid <= 1'b0;
        running  <= 1'b1;
        halted   <= 1'b0;
        error    <= 1'b0;
      end
    end else if (stop) begin
      running  <= 1'b0;
      halted   <= 1'b1;
      error    <= ex.illegal;
      if_valid <= 1'b0;
    end else begin
      if (dnn_start) sw_wait <= 1'b1;
      else if (sw_wait && !dnn_busy) sw_wait <= 1'b0;
      if (flush) begin
        pc       <= PC_W'(ex.target);
        if_valid <= 1'b0;
      end else if (!stall) begin
        if_instr <= instr;
        if_valid <= 1'b1;
        pc       <= pc + 1'b1;
      end
    end
  end
endmodule
