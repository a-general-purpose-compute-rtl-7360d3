// icache: instruction memory of the vector CPU.
//
// DEPTH 32-bit instructions, written through a load port and read
// combinationally at the fetch address. The fetch stage registers the word,
// which makes it the first of the two pipeline stages. An instruction cache
// next to the CIM macros follows the published design; it holds the whole
// program here (no refill), which is this design's choice.
module icache #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
