// tb_mult_ctrl: self-checking test of the multiplier controller on its own.
//
// The shift register and the ALU around the controller are modelled here in
// plain behavioural code (not with the RTL units): u and v follow the sop
// commands, and alu_out answers the zero test or the sum on inst. For each
// operand pair the test pulses go, then checks
//   - the product in acc when done returns,
//   - the latency: 2 cycles if a = 0, else 2*n + 3 with n the bit length of b,
//   - one init command in the go cycle and exactly n shft commands,
//   - that done stays low while the multiplication runs.
// Corner operands (0, 1, all-ones) come first, then random ones. A
// cycle-count watchdog guards the run.
module tb_mult_ctrl;
  import mult_pkg::*;

  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [2*W-1:0] alu_out, u, acc, i1, i2;
  logic [W-1:0]   v, a, b;
  logic           done;
  alu_inst_t      inst;
  sop_t           sop;
  int checks = 0, failures = 0, cycles = 0;
  int n_init, n_shft;

  mult_ctrl #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .go(go), .alu_out(alu_out), .u(u), .v(v),
    .done(done), .acc(acc), .i1(i1), .i2(i2), .inst(inst), .sop(sop)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // behavioural shift register and ALU
  always @(posedge clk) begin
    if (sop == SOP_INIT) begin u <= {{W{1'b0}}, a}; v <= b; n_init++; end
    else if (sop == SOP_SHFT) begin u <= u * 2; v <= v / 2; n_shft++; end
  end
  always_comb alu_out = (inst == ALU_ADD) ? i1 + i2 : {{(2*W-1){1'b0}}, (i1 == 0)};

  function automatic int bitlen(input logic [W-1:0] x);
    int n = 0;
    for (int i = 0; i < W; i++) if (x[i]) n = i + 1;
    return n;
  endfunction

  task automatic run(input logic [W-1:0] ta, input logic [W-1:0] tb);
    int lat, exp_lat;
    longint unsigned prod;
    a = ta; b = tb;
    n_init = 0; n_shft = 0;
    @(negedge clk);
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    a = W'($urandom()); b = W'($urandom());  // operands are sampled only with go
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
      if (lat > 100) break;
    end
    prod = longint'(ta) * longint'(tb);
    exp_lat = (ta == 0) ? 2 : 2 * bitlen(tb) + 3;
    checks++;
    if (acc !== (2*W)'(prod)) begin
      failures++; $display("FAIL %0d*%0d acc=%0d", ta, tb, acc);
    end
    checks++;
    if (lat != exp_lat) begin
      failures++; $display("FAIL %0d*%0d latency %0d expected %0d", ta, tb, lat, exp_lat);
    end
    checks++;
    if (n_init != 1 || n_shft != ((ta == 0) ? 0 : bitlen(tb))) begin
      failures++; $display("FAIL %0d*%0d init %0d shft %0d", ta, tb, n_init, n_shft);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!done || acc !== '0) begin failures++; $display("FAIL reset state"); end
    run(0, 5); run(7, 0); run(0, 0); run(1, 1); run('1, '1); run(3, 16'h8000);
    for (int n = 0; n < 200; n++) run(W'($urandom()), W'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
