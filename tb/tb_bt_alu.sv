// tb_bt_alu: self-checking test of the multiplier's ALU.
//
// For ALU_ADD it compares out with i1 + i2 formed here (modulo 2**32),
// including carries across the whole word; for ALU_ZERO it checks that bit 0
// is the zero test of i1 and that every other bit is 0. Operands are random
// plus the corner values 0, 1 and all-ones. A watchdog guards the run.
module tb_bt_alu;
  import mult_pkg::*;

  localparam int unsigned W = 32;

  logic [W-1:0] i1, i2, out;
  alu_inst_t    inst;
  int checks = 0, failures = 0;

  bt_alu #(.WIDTH(W)) dut (.i1(i1), .i2(i2), .inst(inst), .out(out));

  task automatic apply(input alu_inst_t op, input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] sum;
    logic [W-1:0] expected;
    i1 = x; i2 = y; inst = op;
    #1;
    sum = {1'b0, x} + {1'b0, y};
    if (op == ALU_ADD) expected = sum[W-1:0];
    else               expected = {{(W-1){1'b0}}, (x == '0)};
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL op=%s i1=%h i2=%h out=%h expected %h", op.name(), x, y, out, expected);
    end
  endtask

  initial begin
    apply(ALU_ZERO, '0, '1);
    apply(ALU_ZERO, 1, 0);
    apply(ALU_ZERO, 32'h8000_0000, 0);
    apply(ALU_ADD, '1, 1);
    apply(ALU_ADD, 32'h7fff_ffff, 32'h7fff_ffff);
    apply(ALU_ADD, 0, 0);
    for (int n = 0; n < 300; n++) begin
      apply(ALU_ADD, $urandom(), $urandom());
      apply(ALU_ZERO, ($urandom_range(3) == 0) ? '0 : W'($urandom()), $urandom());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
