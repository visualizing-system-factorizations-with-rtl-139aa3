// tb_gc_mem: self-checking test of the garbage collector's two-half-space
// memory.
//
// Keeps its own model of the OLD and NEW half-spaces as two arrays that are
// physically exchanged on MSWAP (the RTL only flips a selector), so the test
// does not share the design's mechanism. It first fills both half-spaces,
// then issues random instructions from the whole set, and compares mout in
// every cycle with the model: the read of the current state, or 0 for an
// instruction that reads nothing. A small address window is used in the
// random phase so that reads hit written words often. Every instruction must
// occur. A cycle-count watchdog guards the run.
module tb_gc_mem;
  import gc_mem_pkg::*;

  localparam int unsigned AW = 10;
  localparam int unsigned DW = 32;
  localparam int unsigned DEPTH = 1 << AW;

  logic clk = 1'b0, rst_n = 1'b0;
  mop_t          mop;
  logic [AW-1:0] mwt_ad, mrd_ad;
  logic [DW-1:0] mdata, mout, expected;
  logic [DW-1:0] m_old [DEPTH];
  logic [DW-1:0] m_new [DEPTH];
  logic [DW-1:0] tmp;
  int checks = 0, failures = 0, cycles = 0;
  int seen [7];

  gc_mem #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk(clk), .rst_n(rst_n), .mop(mop), .mwt_ad(mwt_ad), .mdata(mdata),
    .mrd_ad(mrd_ad), .mout(mout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic step(input mop_t op, input logic [AW-1:0] wa, input logic [DW-1:0] wd,
                      input logic [AW-1:0] ra);
    @(negedge clk);
    mop = op; mwt_ad = wa; mdata = wd; mrd_ad = ra;
    #1;
    case (op)
      MROLD, MWNRO: expected = m_old[ra];
      MRNEW:        expected = m_new[ra];
      default:      expected = '0;
    endcase
    checks++;
    if (mout !== expected) begin
      failures++;
      $display("FAIL op=%s ra=%0d mout=%h expected %h", op.name(), ra, mout, expected);
    end
    if (int'(op) < 7) seen[int'(op)]++;
    @(posedge clk);
    case (op)
      MSWAP: for (int i = 0; i < DEPTH; i++) begin tmp = m_old[i]; m_old[i] = m_new[i]; m_new[i] = tmp; end
      MWOLD: m_old[wa] = wd;
      MWNEW, MWNRO: m_new[wa] = wd;
      default: ;
    endcase
  endtask

  initial begin
    mop = MNOP; mwt_ad = '0; mdata = '0; mrd_ad = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      step(MWOLD, AW'(i), DW'($urandom()), '0);
      step(MWNEW, AW'(i), DW'($urandom()), '0);
    end
    for (int i = 0; i < DEPTH; i++) begin
      step(MROLD, '0, '0, AW'(i));
      step(MRNEW, '0, '0, AW'(i));
    end
    for (int n = 0; n < 4000; n++) begin
      mop_t op;
      op = mop_t'($urandom_range(6));
      step(op, AW'($urandom_range(15)), DW'($urandom()), AW'($urandom_range(15)));
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL instruction %0d never issued", i); end
    end
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
