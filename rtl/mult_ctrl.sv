// mult_ctrl: controller of the factored shift-and-add multiplier (MULT).
//
// After factorization this block keeps only the control state and the
// accumulator. The operand registers u and v live in shiftreg, and the
// zero tests and the addition are done by bt_alu. Each clock cycle is one row
// of the behavior table:
//
//   state  condition      next   sop   acc                  i1   i2  inst
//   idle   go = 0         idle   hold  acc                  -    -   -
//   idle   go = 1         zu     init  0                    -    -   -
//   zu                    zu?idle:zv   hold  acc            u    -   zero
//   zv                    zv?idle:shift hold acc            v    -   zero
//   shift                 zv     shft  v odd ? out : acc    acc  u   add
//
// where "zu?" / "zv?" stand for bit 0 of the ALU result alu_out. done is 1 in
// idle only. The parity test (even? v) stays in the controller, as in the
// design. The product is ready when done returns to 1. For a = 0 the
// controller leaves after one cycle in zu; otherwise it spends 1 cycle in zu,
// 2 cycles (zv, shift) per bit of b up to its highest 1, and 1 final zv cycle.
//
// The states, the commands and the wiring follow the design. One term
// departs from it: the design's table adds v to acc in the shift row, which
// does not form a product, so this controller adds u (the shifted
// multiplicand), the term that makes acc equal a*b. The widths, the encodings
// and the synchronous active-low reset (to idle, acc = 0) are this design's
// choices; don't-care outputs are driven as hold, zero and 0.
module mult_ctrl
  import mult_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               go,
  input  logic [2*WIDTH-1:0] alu_out,
  input  logic [2*WIDTH-1:0] u,
  input  logic [WIDTH-1:0]   v,
  output logic               done,
  output logic [2*WIDTH-1:0] acc,
  output logic [2*WIDTH-1:0] i1,
  output logic [2*WIDTH-1:0] i2,
  output alu_inst_t          inst,
  output sop_t               sop
);

  mult_state_t state, state_nxt;
  logic [2*WIDTH-1:0] acc_nxt;

  always_comb begin
    state_nxt = state;
    acc_nxt   = acc;
    sop       = SOP_HOLD;
    i1        = '0;
    i2        = '0;
    inst      = ALU_ZERO;
    unique case (state)
      ST_IDLE: begin
        if (go) begin
          state_nxt = ST_ZU;
          sop       = SOP_INIT;
          acc_nxt   = '0;
        end
      end
      ST_ZU: begin
        i1        = u;
        state_nxt = alu_out[0] ? ST_IDLE : ST_ZV;
      end
      ST_ZV: begin
        i1        = {{WIDTH{1'b0}}, v};
        state_nxt = alu_out[0] ? ST_IDLE : ST_SHIFT;
      end
      ST_SHIFT: begin
        i1        = acc;
        i2        = u;
        inst      = ALU_ADD;
        sop       = SOP_SHFT;
        state_nxt = ST_ZV;
        if (v[0]) acc_nxt = alu_out;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      acc   <= '0;
    end else begin
      state <= state_nxt;
      acc   <= acc_nxt;
    end
  end

  always_comb done = (state == ST_IDLE);

  // The shift row is only entered after zv has found v non-zero.
  a_shift_v_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_SHIFT) |-> (v != '0));

endmodule
