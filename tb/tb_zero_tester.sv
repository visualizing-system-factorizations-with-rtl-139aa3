// tb_zero_tester: self-checking test of zero_tester at its default width.
//
// Applies 0, every one-hot word, all-ones and random words, and compares
// zout with the expected (zin == 0) worked out here bit by bit. A watchdog
// ends the run with a failure if the stimulus ever hangs.
module tb_zero_tester;

  localparam int unsigned W = 32;

  logic [W-1:0] zin;
  logic         zout;
  int checks = 0, failures = 0;

  zero_tester #(.WIDTH(W)) dut (.zin(zin), .zout(zout));

  task automatic check(input logic [W-1:0] val);
    logic expect_zero;
    zin = val;
    #1;
    expect_zero = 1'b1;
    for (int i = 0; i < W; i++) if (val[i]) expect_zero = 1'b0;
    checks++;
    if (zout !== expect_zero) begin
      failures++;
      $display("FAIL zin=%h zout=%b expected %b", val, zout, expect_zero);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < W; i++) check(W'(1) << i);
    check('1);
    for (int n = 0; n < 200; n++) check($urandom());
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
