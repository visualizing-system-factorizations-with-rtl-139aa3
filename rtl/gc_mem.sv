// gc_mem: the two-half-space memory of a stop-and-copy garbage collector.
//
// The collector copies live objects from the OLD half-space into the NEW one
// and then exchanges the two. This block hides both half-spaces behind one
// instruction port (mop) with a write address, write data and read address:
//   MNOP   nothing
//   MSWAP  OLD and NEW exchange roles
//   MWOLD  OLD[mwt_ad] := mdata
//   MWNEW  NEW[mwt_ad] := mdata
//   MROLD  mout = OLD[mrd_ad]
//   MRNEW  mout = NEW[mrd_ad]
//   MWNRO  NEW[mwt_ad] := mdata and mout = OLD[mrd_ad], in the same cycle
// Writes and the swap take effect at the rising clock edge. mout is
// combinational: it shows the addressed word of the current state in the same
// cycle (0 when the instruction reads nothing), and a word written in a cycle
// is visible from the next one.
//
// How it works: the half-spaces are two register arrays, bank 0 and bank 1,
// each with one write and one read port. A selector bit old_sel names the
// bank that is OLD; MSWAP just inverts it, so a swap costs one cycle whatever
// the size. Because MWNRO writes one bank and reads the other, no bank ever
// needs two ports. The instruction set follows the design's MEM table; the
// sizes, the encoding, the selector and the reset (old_sel := bank 0, array
// contents not reset) are this design's choices. An assertion flags the
// eighth, undefined instruction code.
module gc_mem
  import gc_mem_pkg::*;
#(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mop_t              mop,
  input  logic [ADDR_W-1:0] mwt_ad,
  input  logic [DATA_W-1:0] mdata,
  input  logic [ADDR_W-1:0] mrd_ad,
  output logic [DATA_W-1:0] mout
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] bank0 [DEPTH];
  logic [DATA_W-1:0] bank1 [DEPTH];
  logic              old_sel;  // bank holding OLD; NEW is the other one

  logic wr_old, wr_new, rd_old, rd_new;
  logic we0, we1;
  logic [DATA_W-1:0] rd0, rd1;

  always_comb begin
    wr_old = (mop == MWOLD);
    wr_new = (mop == MWNEW) || (mop == MWNRO);
    rd_old = (mop == MROLD) || (mop == MWNRO);
    rd_new = (mop == MRNEW);
    we0    = (wr_old && !old_sel) || (wr_new &&  old_sel);
    we1    = (wr_old &&  old_sel) || (wr_new && !old_sel);
  end

  always_ff @(posedge clk) begin
    if (we0) bank0[mwt_ad] <= mdata;
  end

  always_ff @(posedge clk) begin
    if (we1) bank1[mwt_ad] <= mdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)            old_sel <= 1'b0;
    else if (mop == MSWAP) old_sel <= ~old_sel;
  end

  always_comb begin
    rd0 = bank0[mrd_ad];
    rd1 = bank1[mrd_ad];
    if (rd_old)      mout = old_sel ? rd1 : rd0;
    else if (rd_new) mout = old_sel ? rd0 : rd1;
    else             mout = '0;
  end

  // Only the seven defined instructions may be issued.
  a_mop_defined: assert property (@(posedge clk) disable iff (!rst_n)
    mop inside {MNOP, MSWAP, MWOLD, MWNEW, MROLD, MRNEW, MWNRO});

endmodule
