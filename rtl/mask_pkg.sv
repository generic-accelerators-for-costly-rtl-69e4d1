// Shared types and constants of the masked instruction-set extension.
//
// A masked 32-bit value is carried as two Boolean shares, value = s0 ^ s1.
// Outside the masked ALU the second share is kept bit-reversed, so that no
// pipeline stage can combine two bits of equal weight by accident; only the
// masked ALU restores the natural order (see bitrev()).
//
// The encodings are those of the three new R-type instructions:
// funct7 0x7c, opcode 0x5b, funct3 0/1/2 for cmov/cmpeq/cmpgt.
// The enum values for the ALU and the randomness budget are this design's
// own choices.
package mask_pkg;

  localparam int unsigned XLEN = 32;

  // Fresh random bits consumed per cycle by the masked ALU (largest unit:
  // one 32-bit DOM AND for generate plus 64 bits per Kogge-Stone level).
  localparam int unsigned RND_W = 64;

  localparam logic [6:0] OPC_MASK   = 7'h5b;
  localparam logic [6:0] F7_MASK_EX = 7'h7c;
  localparam logic [2:0] F3_CMOV    = 3'h0;
  localparam logic [2:0] F3_CMPEQ   = 3'h1;
  localparam logic [2:0] F3_CMPGT   = 3'h2;

  // Cycles an operation occupies the masked ALU, the start cycle included;
  // the result is valid in the last of them.
  localparam int unsigned LAT_CMOV  = 1;
  localparam int unsigned LAT_CMPEQ = 5;
  localparam int unsigned LAT_ADD   = 6;

  typedef struct packed {
    logic [XLEN-1:0] s0;   // share 0, natural bit order
    logic [XLEN-1:0] s1;   // share 1 (bit-reversed outside the masked ALU)
  } mword_t;

  typedef enum logic [2:0] {
    MOP_CMOV  = 3'd0,
    MOP_CMPEQ = 3'd1,
    MOP_CMPGT = 3'd2,
    MOP_ADD   = 3'd3,
    MOP_SUB   = 3'd4
  } mop_e;

  function automatic logic [XLEN-1:0] bitrev(input logic [XLEN-1:0] x);
    for (int i = 0; i < XLEN; i++) bitrev[i] = x[XLEN-1-i];
  endfunction

endpackage
