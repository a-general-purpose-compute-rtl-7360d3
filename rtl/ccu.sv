// ccu: central computing unit of one CIM macro.
//
// DNN mode: the 32 one-bit products read out of DAMEM go into four adder trees
// of 8 inputs each, and their counts are added into a 0..32 column count. A
// bit-serial MAC then weights that count by 2^(input bit + weight bit), negates
// it for the weight sign bit (two's-complement weights) and accumulates it.
// One input bit-plane times one weight bit is handled per cycle, so an 8b x 8b
// dot product over 32 channels takes 64 cycles.
//
// CPU mode: the same unit is the integer ALU of the lane. Logic is shared
// between modes: the one 32-bit adder that accumulates MAC terms also performs
// ADD, SUB and the comparisons, and the adder trees count bits for POPC. The
// operands of the part a mode does not use are held at zero (input gating).
// Four adder trees and reuse between modes follow the published design; the
// operation list, the bit-serial order and the signedness are this design's.
//
// Timing: `y` and `acc_next` are combinational. `acc` loads `acc_next` at the
// rising edge when `acc_en` is high; `acc_clr` starts a new sum (the term of
// that cycle is added to zero instead of to `acc`).
module ccu
  import gpcim_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  // CPU mode
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  // DNN mode
  input  logic [NCOL-1:0]  prod,
  input  logic [3:0]       shift,    // input bit + weight bit
  input  logic             neg,      // weight sign bit: subtract the term
  input  logic             acc_clr,
  input  logic             acc_en,
  output logic [WIDTH-1:0] acc_next,
  output logic [WIDTH-1:0] acc
);
  localparam int unsigned GW = NCOL / NTREE;        // inputs per tree
  localparam int unsigned TW = $clog2(GW) + 1;      // tree sum width
  localparam int unsigned CW = $clog2(NCOL) + 1;    // column count width

  logic cpu, dnn;
  assign dnn = (mode == MODE_DNN);
  assign cpu = !dnn;

  // ---------------- adder trees ----------------
  logic [NCOL-1:0] tree_in;
  logic [TW-1:0]   tree_sum [NTREE];
  logic [CW-1:0]   count;

  always_comb begin
    if (dnn)                 tree_in = prod;
    else if (op == ALU_POPC) tree_in = a[NCOL-1:0];
    else                     tree_in = '0;
  end

  for (genvar t = 0; t < NTREE; t++) begin : g_tree
    adder_tree #(.N(GW)) u_tree (
      .bits(tree_in[t*GW +: GW]),
      .sum (tree_sum[t])
    );
  end

  always_comb begin
    count = '0;
    for (int t = 0; t < NTREE; t++) count += CW'(tree_sum[t]);
  end

  // ---------------- shared adder ----------------
  logic [WIDTH-1:0] ga, gb;          // gated ALU operands
  logic [WIDTH-1:0] term;
  logic [WIDTH-1:0] add_a, add_b;
  logic             cin;
  logic [WIDTH:0]   add_s;
  logic             sub_op;

  assign ga   = cpu ? a : '0;
  assign gb   = cpu ? b : '0;
  assign term = dnn ? (WIDTH'(count) << shift) : '0;
  assign sub_op = (op == ALU_SUB) || (op == ALU_SLT) || (op == ALU_SLTU) ||
                  (op == ALU_MIN) || (op == ALU_MAX);

  always_comb begin
    if (dnn) begin
      add_a = acc_clr ? '0 : acc;
      add_b = neg ? ~term : term;
      cin   = neg;
    end else begin
      add_a = ga;
      add_b = sub_op ? ~gb : gb;
      cin   = sub_op;
    end
  end

  assign add_s    = {1'b0, add_a} + {1'b0, add_b} + (WIDTH+1)'(cin);
  assign acc_next = add_s[WIDTH-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                acc <= '0;
    else if (dnn && acc_en)    acc <= acc_next;
  end

  // ---------------- ALU result ----------------
  logic lt_s, lt_u;
  assign lt_u = !add_s[WIDTH];   // borrow out of a - b
  assign lt_s = (ga[WIDTH-1] != gb[WIDTH-1]) ? ga[WIDTH-1] : add_s[WIDTH-1];

  // In DNN mode the shared adder belongs to the MAC: the ALU output is gated.
  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = add_s[WIDTH-1:0];
      ALU_AND:  y = ga & gb;
      ALU_OR:   y = ga | gb;
      ALU_XOR:  y = ga ^ gb;
      ALU_SLL:  y = ga << gb[4:0];
      ALU_SRL:  y = ga >> gb[4:0];
      ALU_SRA:  y = WIDTH'($signed(ga) >>> gb[4:0]);
      ALU_SLT:  y = WIDTH'(lt_s);
      ALU_SLTU: y = WIDTH'(lt_u);
      ALU_MUL:  y = ga * gb;
      ALU_MIN:  y = lt_s ? ga : gb;
      ALU_MAX:  y = lt_s ? gb : ga;
      ALU_POPC: y = cpu ? WIDTH'(count) : '0;
      default:  y = '0;
    endcase
    if (dnn) y = '0;
  end
endmodule
