// tb_shiftreg: self-checking test of the two-value shift register.
//
// Drives a random sequence of init, hold and shft commands with random a and
// b, keeps its own copy of u and v (u doubled, v halved by arithmetic, not by
// shifting) and compares the outputs after every clock edge. The first
// command is always init, since the registers have no reset. A cycle-count
// watchdog guards the run.
module tb_shiftreg;
  import mult_pkg::*;

  localparam int unsigned W = 16;

  logic clk = 1'b0;
  logic [W-1:0]   a, b, v;
  logic [2*W-1:0] u;
  sop_t           sop;
  longint unsigned mu, mv;
  int checks = 0, failures = 0, cycles = 0;

  shiftreg #(.WIDTH(W)) dut (.clk(clk), .a(a), .b(b), .sop(sop), .u(u), .v(v));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom());
      b = W'($urandom());
      if (n == 0) sop = SOP_INIT;
      else case ($urandom_range(5))
        0:       sop = SOP_INIT;
        1, 2:    sop = SOP_HOLD;
        default: sop = SOP_SHFT;
      endcase
      @(posedge clk);
      case (sop)
        SOP_INIT: begin mu = a; mv = b; end
        SOP_SHFT: begin mu = (mu * 2) % (64'd1 << (2*W)); mv = mv / 2; end
        default: ;
      endcase
      #1;
      checks++;
      if (u !== (2*W)'(mu) || v !== W'(mv)) begin
        failures++;
        $display("FAIL sop=%s u=%h v=%h expected %h %h", sop.name(), u, v, mu, mv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
