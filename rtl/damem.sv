// damem: Data cache Activation MEMory of one CIM macro.
//
// A ROWS x WIDTH array that is an ordinary data cache in CPU mode and the
// stationary-input compute array in DNN mode. In the silicon every 6T cell has
// a 3T NAND appended, so a row read yields the 1-bit product of each stored
// bit with a per-column multiplier bit; here that is the AND of the read row
// with `wbit` on output `prod`. The row organisation and width follow the
// published design; the depth is this design's choice.
//
// Timing: one write and one read per cycle. The write lands at the rising
// edge; the read is combinational, so in the following cycle the read sees
// the new value (write-back happens before the read inside a cycle).
module damem #(
  parameter int unsigned ROWS  = 128,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic [WIDTH-1:0] wbit,   // multiplier bit of each column (DNN mode)
  output logic [WIDTH-1:0] prod    // 1b products of the read row
);
  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
  assign prod  = rdata & wbit;
endmodule
