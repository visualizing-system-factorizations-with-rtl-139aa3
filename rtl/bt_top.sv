// bt_top: the three hardware examples of the design, side by side.
//
//   u_mult  mult_system  factored shift-and-add multiplier (go, a, b) ->
//                        (done, acc), acc = a * b
//   u_jk    jk_ff        JK flip-flop with synchronous active-low preset
//   u_mem   gc_mem       two-half-space memory of a stop-and-copy garbage
//                        collector
// The three do not interact; each has its own ports, prefixed mult_, jk_ and
// mem_. The garbage-collector control that would drive the memory is not part
// of this RTL, so the memory's instruction port is brought out as top-level
// ports. All three share clk; rst_n resets the multiplier controller and the
// memory's half-space selector. Timing is that of each block.
module bt_top
  import gc_mem_pkg::*;
#(
  parameter int unsigned MULT_WIDTH = 16,
  parameter int unsigned MEM_ADDR_W = 10,
  parameter int unsigned MEM_DATA_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // multiplier
  input  logic                    mult_go,
  input  logic [MULT_WIDTH-1:0]   mult_a,
  input  logic [MULT_WIDTH-1:0]   mult_b,
  output logic                    mult_done,
  output logic [2*MULT_WIDTH-1:0] mult_acc,
  // JK flip-flop
  input  logic                    jk_j,
  input  logic                    jk_k,
  input  logic                    jk_p,
  output logic                    jk_q,
  output logic                    jk_r,
  // garbage-collector memory
  input  mop_t                    mem_mop,
  input  logic [MEM_ADDR_W-1:0]   mem_wt_ad,
  input  logic [MEM_DATA_W-1:0]   mem_data,
  input  logic [MEM_ADDR_W-1:0]   mem_rd_ad,
  output logic [MEM_DATA_W-1:0]   mem_out
);

  mult_system #(.WIDTH(MULT_WIDTH)) u_mult (
    .clk  (clk),
    .rst_n(rst_n),
    .go   (mult_go),
    .a    (mult_a),
    .b    (mult_b),
    .done (mult_done),
    .acc  (mult_acc)
  );

  jk_ff u_jk (
    .clk(clk),
    .j  (jk_j),
    .k  (jk_k),
    .p  (jk_p),
    .q  (jk_q),
    .r  (jk_r)
  );

  gc_mem #(.ADDR_W(MEM_ADDR_W), .DATA_W(MEM_DATA_W)) u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .mop   (mem_mop),
    .mwt_ad(mem_wt_ad),
    .mdata (mem_data),
    .mrd_ad(mem_rd_ad),
    .mout  (mem_out)
  );

endmodule
