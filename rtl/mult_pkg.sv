// Shared types of the factored shift-and-add multiplier.
//
// The multiplier is split into three communicating parts: a controller
// (mult_ctrl), a two-function ALU (bt_alu) and a two-value shift register
// (shiftreg). The controller talks to the other two by instruction tokens.
// The token names (zero/add for the ALU, init/hold/shft for the shift
// register, idle/zu/zv/shift for the control states) follow the behavior
// tables of the design; their binary encodings are this design's own choice.
package mult_pkg;

  // Operation selected on the ALU's inst line.
  typedef enum logic {
    ALU_ZERO = 1'b0,  // out = zero?(i1), boolean in bit 0
    ALU_ADD  = 1'b1   // out = i1 + i2
  } alu_inst_t;

  // Command on the shift register's Sop line.
  typedef enum logic [1:0] {
    SOP_HOLD = 2'd0,  // u, v keep their values
    SOP_INIT = 2'd1,  // u := a, v := b
    SOP_SHFT = 2'd2   // u := u*2, v := v/2
  } sop_t;

  // Control points of the multiplier.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,  // waiting for go, done = 1
    ST_ZU    = 2'd1,  // test u for zero
    ST_ZV    = 2'd2,  // test v for zero
    ST_SHIFT = 2'd3   // conditional add, then shift
  } mult_state_t;

endpackage
