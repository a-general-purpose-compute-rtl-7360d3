// weight_sram: weight memory of the DNN mode.
//
// One row per output channel holding COLS weights of WBITS bits, weight c in
// bits [c*WBITS +: WBITS]. The row is read combinationally and broadcast to
// every CIM macro, where the DNN sequencer picks one bit of each weight per
// cycle as the column multiplier bit. Loaded through a write port. A weight
// SRAM next to the CIM macros follows the published design; its organisation
// and depth are this design's choice.
module weight_sram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned COLS  = 32,
  parameter int unsigned WBITS = 8,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned RW   = COLS * WBITS
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [RW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [RW-1:0] rdata
);
  logic [RW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
