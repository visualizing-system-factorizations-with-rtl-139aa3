// Instruction set of the garbage collector's two-half-space memory (gc_mem).
//
// The seven instruction names come from the memory's behavior table; the
// 3-bit encoding is this design's own choice. The eighth code is unused and
// acts as a no-operation.
package gc_mem_pkg;

  typedef enum logic [2:0] {
    MNOP  = 3'd0,  // nothing changes, Mout unused
    MSWAP = 3'd1,  // exchange the OLD and NEW half-spaces
    MWOLD = 3'd2,  // OLD[MwtAd] := MData
    MWNEW = 3'd3,  // NEW[MwtAd] := MData
    MROLD = 3'd4,  // Mout = OLD[MRdAd]
    MRNEW = 3'd5,  // Mout = NEW[MRdAd]
    MWNRO = 3'd6   // NEW[MwtAd] := MData and Mout = OLD[MRdAd] in one step
  } mop_t;

endpackage
