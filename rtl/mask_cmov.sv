// Masked conditional move (mask.b.cmov datapath).
//
// res = dest ^ ((dest ^ src) & {32{cond[0]}}), on Boolean shares: the XORs
// are done share by share and the single non-linear step uses one 32-bit DOM
// AND gadget. Each share of the 1-bit condition (bit 0 of each share of cond)
// is replicated to 32 bits on its own, so the condition is never recombined.
// All operands are in natural bit order here (the masked ALU undoes the bit
// reversal of share 1 before this unit).
// Timing: operands come from rising-edge registers and stay stable during
// the cycle in which start is high; res is valid from that cycle's falling
// edge and is sampled at its end: the operation takes one cycle. The only
// state is the gadget's two 32-bit cross-domain registers.
// The algorithm and the one-cycle operation follow the extension's
// description.
module mask_cmov
  import mask_pkg::*;
(
  input  logic            clk,
  input  logic            start,
  input  mword_t          dest,
  input  mword_t          src,
  input  mword_t          cond,
  input  logic [XLEN-1:0] z,
  output mword_t          res
);

  mword_t          diff;
  logic [XLEN-1:0] c0, c1, m0, m1;

  always_comb begin
    diff.s0 = dest.s0 ^ src.s0;
    diff.s1 = dest.s1 ^ src.s1;
    c0      = {XLEN{cond.s0[0]}};
    c1      = {XLEN{cond.s1[0]}};
  end

  dom_and #(.WIDTH(XLEN)) u_and (
    .clk (clk), .en (start),
    .a0  (diff.s0), .a1 (diff.s1),
    .b0  (c0),      .b1 (c1),
    .z   (z),
    .q0  (m0),      .q1 (m1)
  );

  always_comb begin
    res.s0 = dest.s0 ^ m0;
    res.s1 = dest.s1 ^ m1;
  end

endmodule
