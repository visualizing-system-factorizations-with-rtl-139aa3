// jk_ff: JK flip-flop with synchronous, active-low preset.
//
// On each rising clock edge the state q is updated:
//   p = 0            q := 1            (preset wins over J and K)
//   p = 1, j=0 k=0   q := q
//   p = 1, j=0 k=1   q := 0
//   p = 1, j=1 k=0   q := 1
//   p = 1, j=1 k=1   q := not q
// r is combinational and always equals not q. The function is exactly the
// design's JK table. The table leaves the initial state open, so there is no
// reset: drive p low for one clock to give q a known value.
module jk_ff (
  input  logic clk,
  input  logic j,
  input  logic k,
  input  logic p,
  output logic q,
  output logic r
);

  always_ff @(posedge clk) begin
    if (!p) q <= 1'b1;
    else begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        2'b11: q <= ~q;
      endcase
    end
  end

  always_comb r = ~q;

endmodule
