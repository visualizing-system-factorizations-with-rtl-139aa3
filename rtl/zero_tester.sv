// zero_tester: the ZERO? unit of the multiplier, a combinational test of a
// word for zero.
//
// zout is 1 exactly when every bit of zin is 0. It has no state and no
// clock; the answer is valid in the same cycle as zin. The function is the
// one the design assigns to this unit; the width parameter is this design's
// choice (default 32, the multiplier's product width).
module zero_tester #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] zin,
  output logic             zout
);

  always_comb zout = (zin == '0);

endmodule
