// domem: Data cache Output MEMory of one CIM macro.
//
// A ROWS x WIDTH memory with two read ports and one write port per cycle. In
// DNN mode it collects the MAC outputs; in CPU mode its rows are the vector
// register file and a data cache at once, so an instruction names DOMEM rows
// directly as operands. Two reads and one write per cycle follow the published
// design; depth and width are this design's choice.
//
// Timing: the write lands at the rising edge and both reads are
// combinational, so an instruction reads the result of the one just before
// it without any forwarding path.
module domem #(
  parameter int unsigned ROWS  = 128,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign rd1 = mem[ra1];
  assign rd2 = mem[ra2];
endmodule
