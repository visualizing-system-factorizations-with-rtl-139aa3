// shiftreg: the two-value shift register holding the multiplier's operands.
//
// Two registers, u (2*WIDTH bits) and v (WIDTH bits), updated on the rising
// clock edge under the command on sop:
//   SOP_INIT  u := a (zero-extended), v := b
//   SOP_HOLD  u, v unchanged
//   SOP_SHFT  u := u * 2 (shift left), v := v / 2 (logical shift right)
// u and v are the register outputs, so a command takes effect on the next
// cycle. The three commands follow the design's SHIFTREG table; the widths,
// the encoding of sop and the absence of a reset are this design's choices
// (the controller always issues SOP_INIT before it reads u or v). u is twice
// as wide as the operands so that doubling it never drops a product bit.
module shiftreg
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  sop_t               sop,
  output logic [2*WIDTH-1:0] u,
  output logic [WIDTH-1:0]   v
);

  always_ff @(posedge clk) begin
    unique case (sop)
      SOP_INIT: begin
        u <= {{WIDTH{1'b0}}, a};
        v <= b;
      end
      SOP_SHFT: begin
        u <= u << 1;
        v <= v >> 1;
      end
      default: ;  // SOP_HOLD and the unused code keep u and v
    endcase
  end

endmodule
