// tb_bt_top: end-to-end test of bt_top at its default parameters.
//
// The three examples run at the same time, each driven by its own thread:
//   multiplier  operand pairs (corners, then random) -> product and latency
//               checked against values computed here;
//   JK          random J, K, P against the flip-flop's next-state table;
//   memory      fill both half-spaces, then random instructions, checked
//               against a model that physically exchanges its two arrays.
// It counts how often each mechanism happened and fails any that never did:
// the multiplier's early exit on a zero multiplicand (zu), its exit on an
// exhausted multiplier (zv), a shift step that adds and one that does not;
// the five JK rows (preset, hold, reset, set, toggle); and all seven memory
// instructions, including at least two swaps and a write-NEW/read-OLD in one
// step. One multiplication at full width is a complete operation. A
// cycle-count watchdog guards the run.
module tb_bt_top;
  import gc_mem_pkg::*;
  import mult_pkg::*;

  localparam int unsigned W  = 16;
  localparam int unsigned AW = 10;
  localparam int unsigned DW = 32;
  localparam int unsigned DEPTH = 1 << AW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic           mult_go = 1'b0, mult_done;
  logic [W-1:0]   mult_a, mult_b;
  logic [2*W-1:0] mult_acc;
  logic           jk_j, jk_k, jk_p, jk_q, jk_r;
  mop_t           mem_mop;
  logic [AW-1:0]  mem_wt_ad, mem_rd_ad;
  logic [DW-1:0]  mem_data, mem_out;

  int checks = 0, failures = 0, cycles = 0;
  int n_zu_exit = 0, n_zv_exit = 0, n_add = 0, n_noadd = 0, n_mult = 0;
  int jk_seen [5];
  int mem_seen [7];

  bt_top dut (
    .clk(clk), .rst_n(rst_n),
    .mult_go(mult_go), .mult_a(mult_a), .mult_b(mult_b), .mult_done(mult_done), .mult_acc(mult_acc),
    .jk_j(jk_j), .jk_k(jk_k), .jk_p(jk_p), .jk_q(jk_q), .jk_r(jk_r),
    .mem_mop(mem_mop), .mem_wt_ad(mem_wt_ad), .mem_data(mem_data), .mem_rd_ad(mem_rd_ad),
    .mem_out(mem_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Mechanism counters of the multiplier, taken from its control state.
  always @(posedge clk) if (rst_n) begin
    case (dut.u_mult.u_mult.state)
      ST_ZU:    if (dut.u_mult.u_mult.alu_out[0]) n_zu_exit++;
      ST_ZV:    if (dut.u_mult.u_mult.alu_out[0]) n_zv_exit++;
      ST_SHIFT: if (dut.u_mult.u_mult.v[0]) n_add++; else n_noadd++;
      default: ;
    endcase
  end

  function automatic int bitlen(input logic [W-1:0] x);
    int n = 0;
    for (int i = 0; i < W; i++) if (x[i]) n = i + 1;
    return n;
  endfunction

  task automatic mult_run(input logic [W-1:0] ta, input logic [W-1:0] tb);
    int lat, exp_lat;
    longint unsigned prod;
    mult_a = ta; mult_b = tb;
    @(negedge clk);
    mult_go = 1'b1;
    @(negedge clk);
    mult_go = 1'b0;
    mult_a = W'($urandom()); mult_b = W'($urandom());
    lat = 1;
    while (!mult_done && lat <= 100) begin
      @(negedge clk);
      lat++;
    end
    prod = longint'(ta) * longint'(tb);
    exp_lat = (ta == 0) ? 2 : 2 * bitlen(tb) + 3;
    checks++;
    if (mult_acc !== (2*W)'(prod)) begin
      failures++; $display("FAIL mult %0d*%0d acc=%0d", ta, tb, mult_acc);
    end
    checks++;
    if (lat != exp_lat) begin
      failures++; $display("FAIL mult %0d*%0d latency %0d expected %0d", ta, tb, lat, exp_lat);
    end
    n_mult++;
  endtask

  task automatic mult_thread();
    mult_run(0, 3); mult_run(5, 0); mult_run('1, '1); mult_run(6, 7);
    for (int n = 0; n < 100; n++) mult_run(W'($urandom()), W'($urandom()));
  endtask

  task automatic jk_thread();
    logic mq = 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      jk_j = 1'($urandom());
      jk_k = 1'($urandom());
      jk_p = (n == 0) ? 1'b0 : ($urandom_range(7) != 0);
      @(posedge clk);
      if (!jk_p)                begin mq = 1'b1; jk_seen[0]++; end
      else if (!jk_j && !jk_k)  begin            jk_seen[1]++; end
      else if (!jk_j &&  jk_k)  begin mq = 1'b0; jk_seen[2]++; end
      else if ( jk_j && !jk_k)  begin mq = 1'b1; jk_seen[3]++; end
      else                      begin mq = !mq;  jk_seen[4]++; end
      #1;
      checks++;
      if (jk_q !== mq || jk_r !== !mq) begin
        failures++; $display("FAIL jk q=%b r=%b expected q=%b", jk_q, jk_r, mq);
      end
    end
  endtask

  logic [DW-1:0] m_old [DEPTH];
  logic [DW-1:0] m_new [DEPTH];

  task automatic mem_step(input mop_t op, input logic [AW-1:0] wa, input logic [DW-1:0] wd,
                          input logic [AW-1:0] ra);
    logic [DW-1:0] expected, tmp;
    @(negedge clk);
    mem_mop = op; mem_wt_ad = wa; mem_data = wd; mem_rd_ad = ra;
    #1;
    case (op)
      MROLD, MWNRO: expected = m_old[ra];
      MRNEW:        expected = m_new[ra];
      default:      expected = '0;
    endcase
    checks++;
    if (mem_out !== expected) begin
      failures++; $display("FAIL mem op=%s ra=%0d out=%h expected %h", op.name(), ra, mem_out, expected);
    end
    if (int'(op) < 7) mem_seen[int'(op)]++;
    @(posedge clk);
    case (op)
      MSWAP: for (int i = 0; i < DEPTH; i++) begin tmp = m_old[i]; m_old[i] = m_new[i]; m_new[i] = tmp; end
      MWOLD: m_old[wa] = wd;
      MWNEW, MWNRO: m_new[wa] = wd;
      default: ;
    endcase
  endtask

  task automatic mem_thread();
    for (int i = 0; i < DEPTH; i++) begin
      mem_step(MWOLD, AW'(i), DW'($urandom()), '0);
      mem_step(MWNEW, AW'(i), DW'($urandom()), '0);
    end
    // a copy pass as a collector would make it: read OLD, write NEW, swap
    for (int i = 0; i < 32; i++) mem_step(MWNRO, AW'(i), DW'(i * 3 + 1), AW'(i + 1));
    mem_step(MSWAP, '0, '0, '0);
    for (int i = 0; i < 32; i++) mem_step(MROLD, '0, '0, AW'(i));
    for (int n = 0; n < 1500; n++)
      mem_step(mop_t'($urandom_range(6)), AW'($urandom_range(15)), DW'($urandom()),
               AW'($urandom_range(15)));
  endtask

  initial begin
    mult_a = '0; mult_b = '0;
    jk_j = 1'b0; jk_k = 1'b0; jk_p = 1'b0;
    mem_mop = MNOP; mem_wt_ad = '0; mem_data = '0; mem_rd_ad = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      mult_thread();
      jk_thread();
      mem_thread();
    join
    $display("mechanisms: mult runs %0d, zu exits %0d, zv exits %0d, add steps %0d, no-add steps %0d",
             n_mult, n_zu_exit, n_zv_exit, n_add, n_noadd);
    $display("jk rows preset/hold/reset/set/toggle: %0d %0d %0d %0d %0d",
             jk_seen[0], jk_seen[1], jk_seen[2], jk_seen[3], jk_seen[4]);
    $display("mem nop/swap/wold/wnew/rold/rnew/wnro: %0d %0d %0d %0d %0d %0d %0d",
             mem_seen[0], mem_seen[1], mem_seen[2], mem_seen[3], mem_seen[4], mem_seen[5], mem_seen[6]);
    checks++; if (n_zu_exit == 0) begin failures++; $display("FAIL no zu exit"); end
    checks++; if (n_zv_exit == 0) begin failures++; $display("FAIL no zv exit"); end
    checks++; if (n_add == 0)     begin failures++; $display("FAIL no add step"); end
    checks++; if (n_noadd == 0)   begin failures++; $display("FAIL no no-add step"); end
    for (int i = 0; i < 5; i++) begin
      checks++; if (jk_seen[i] == 0) begin failures++; $display("FAIL jk row %0d never", i); end
    end
    for (int i = 0; i < 7; i++) begin
      checks++; if (mem_seen[i] == 0) begin failures++; $display("FAIL mem op %0d never", i); end
    end
    checks++; if (mem_seen[1] < 2) begin failures++; $display("FAIL fewer than two swaps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
