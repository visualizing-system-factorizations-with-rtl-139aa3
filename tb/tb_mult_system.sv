// tb_mult_system: end-to-end test of the factored multiplier.
//
// Pulses go with an operand pair, changes a and b right after the go cycle
// (they must have been sampled), waits for done and compares acc with a * b
// computed here. It also checks the latency (2 cycles for a = 0, else
// 2*n + 3 with n the bit length of b) and that acc holds its value while the
// multiplier idles. Corner pairs come first, then random ones.
// Alongside the factored design runs a behavioural model of the unfactored
// multiplier table (one control process that owns u, v, acc and the state),
// and done and acc are compared with it on every clock cycle: factoring the
// design into three units must not change its cycle-by-cycle behaviour. A
// cycle-count watchdog guards the run.
module tb_mult_system;

  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] acc;
  logic           done;
  int checks = 0, failures = 0, cycles = 0;

  mult_system #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .go(go), .a(a), .b(b), .done(done), .acc(acc)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Unfactored reference: the whole multiplier table in one process.
  typedef enum {R_IDLE, R_ZU, R_ZV, R_SHIFT} rstate_t;
  rstate_t        r_state;
  logic [2*W-1:0] r_u, r_acc;
  logic [W-1:0]   r_v;
  int             lockstep_checks = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      r_state <= R_IDLE;
      r_acc   <= '0;
    end else begin
      case (r_state)
        R_IDLE:  if (go) begin r_state <= R_ZU; r_u <= {{W{1'b0}}, a}; r_v <= b; r_acc <= '0; end
        R_ZU:    r_state <= (r_u == 0) ? R_IDLE : R_ZV;
        R_ZV:    r_state <= (r_v == 0) ? R_IDLE : R_SHIFT;
        R_SHIFT: begin
          r_state <= R_ZV;
          r_u     <= r_u * 2;
          r_v     <= r_v / 2;
          if (r_v % 2 == 1) r_acc <= r_acc + r_u;
        end
      endcase
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    lockstep_checks++;
    if (done !== (r_state == R_IDLE) || acc !== r_acc) begin
      failures++;
      $display("FAIL lock-step: done=%b acc=%h, unfactored model done=%b acc=%h",
               done, acc, r_state == R_IDLE, r_acc);
    end
  end

  function automatic int bitlen(input logic [W-1:0] x);
    int n = 0;
    for (int i = 0; i < W; i++) if (x[i]) n = i + 1;
    return n;
  endfunction

  task automatic run(input logic [W-1:0] ta, input logic [W-1:0] tb);
    int lat, exp_lat;
    longint unsigned prod;
    a = ta; b = tb;
    @(negedge clk);
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    a = W'($urandom()); b = W'($urandom());
    lat = 1;
    while (!done && lat <= 100) begin
      @(negedge clk);
      lat++;
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
    repeat (2) @(negedge clk);
    checks++;
    if (!done || acc !== (2*W)'(prod)) begin
      failures++; $display("FAIL %0d*%0d result not held", ta, tb);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(0, 9); run(9, 0); run(1, 1); run('1, '1); run(16'h8000, 16'h8000); run(12, 10);
    for (int n = 0; n < 300; n++) run(W'($urandom()), W'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 30000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
