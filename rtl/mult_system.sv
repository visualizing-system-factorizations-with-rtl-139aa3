// mult_system: the shift-and-add multiplier after factorization.
//
// Computes acc = a * b for unsigned WIDTH-bit operands. It is built from
// three units connected as in the design's final block diagram:
//   mult_ctrl  control states and accumulator (MULT)
//   bt_alu     zero test and adder (ALU), nets x1 (i1), x2 (i2), x3 (inst),
//              x4 (out -> MULT's zout input)
//   shiftreg   operand registers u, v (SHIFTREG), net x7 (Sop) from MULT,
//              x5 (v) and x6 (u) back to MULT
// Protocol: while done = 1 the multiplier is idle. Raising go for one cycle
// samples a and b in that cycle; done drops on the next cycle and returns to
// 1 when acc holds the product. acc then holds its value until the next go.
// Latency from the go cycle to done = 1: 2 cycles if a = 0, otherwise
// 2*n + 3 cycles where n is the position of b's highest 1 plus one (n = 0
// for b = 0). The structure follows the design; widths and reset are this
// design's choices.
module mult_system
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               go,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic               done,
  output logic [2*WIDTH-1:0] acc
);

  logic [2*WIDTH-1:0] x1, x2, x4, x6;
  alu_inst_t          x3;
  logic [WIDTH-1:0]   x5;
  sop_t               x7;

  mult_ctrl #(.WIDTH(WIDTH)) u_mult (
    .clk    (clk),
    .rst_n  (rst_n),
    .go     (go),
    .alu_out(x4),
    .u      (x6),
    .v      (x5),
    .done   (done),
    .acc    (acc),
    .i1     (x1),
    .i2     (x2),
    .inst   (x3),
    .sop    (x7)
  );

  bt_alu #(.WIDTH(2*WIDTH)) u_alu (
    .i1  (x1),
    .i2  (x2),
    .inst(x3),
    .out (x4)
  );

  shiftreg #(.WIDTH(WIDTH)) u_shiftreg (
    .clk(clk),
    .a  (a),
    .b  (b),
    .sop(x7),
    .u  (x6),
    .v  (x5)
  );

endmodule
