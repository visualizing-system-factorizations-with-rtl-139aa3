// bt_alu: the "simple ALU" factored out of the shift-and-add multiplier.
//
// One combinational unit serves both functions the controller needs, chosen
// by the inst line: ALU_ZERO answers zero?(i1) in bit 0 of out (all other
// bits 0), ALU_ADD returns i1 + i2 modulo 2**WIDTH. The zero test is done by
// a zero_tester instance. There is no clock: out follows the inputs in the
// same cycle, so the controller can act on it in the step that asked.
//
// The instruction set and the two operations follow the design. Merging the
// boolean and the integer result onto one output line is the single-output
// form of the ALU shown in the design's block diagram; putting the boolean in
// bit 0 and the width are this design's choices.
module bt_alu
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] i1,
  input  logic [WIDTH-1:0] i2,
  input  alu_inst_t        inst,
  output logic [WIDTH-1:0] out
);

  logic is_zero;

  zero_tester #(.WIDTH(WIDTH)) u_zero (
    .zin (i1),
    .zout(is_zero)
  );

  always_comb begin
    unique case (inst)
      ALU_ZERO: out = {{(WIDTH-1){1'b0}}, is_zero};
      ALU_ADD:  out = i1 + i2;
      default:  out = '0;
    endcase
  end

endmodule
