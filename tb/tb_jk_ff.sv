// tb_jk_ff: self-checking test of the JK flip-flop with synchronous preset.
//
// Presets the flip-flop, then applies random J, K and P (preset asserted on
// about one cycle in eight) and compares q with a model built from the
// flip-flop's next-state table, and r with not q, after every edge. Every one
// of the five table rows must occur. A cycle-count watchdog guards the run.
module tb_jk_ff;

  logic clk = 1'b0;
  logic j, k, p, q, r;
  logic mq;
  int checks = 0, failures = 0, cycles = 0;
  int seen [5];

  jk_ff dut (.clk(clk), .j(j), .k(k), .p(p), .q(q), .r(r));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    for (int n = 0; n < 1000; n++) begin
      j = 1'($urandom());
      k = 1'($urandom());
      p = (n == 0) ? 1'b0 : ($urandom_range(7) != 0);
      @(posedge clk);
      if (!p)              begin mq = 1'b1; seen[0]++; end
      else if (!j && !k)   begin            seen[1]++; end
      else if (!j &&  k)   begin mq = 1'b0; seen[2]++; end
      else if ( j && !k)   begin mq = 1'b1; seen[3]++; end
      else                 begin mq = !mq;  seen[4]++; end
      #1;
      checks++;
      if (q !== mq || r !== !mq) begin
        failures++;
        $display("FAIL j=%b k=%b p=%b q=%b r=%b expected q=%b", j, k, p, q, r, mq);
      end
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL table row %0d never applied", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
