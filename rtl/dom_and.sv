// First-order domain-oriented-masking (DOM) AND gadget on Boolean shares.
//
// Computes q = a & b where a = a0 ^ a1, b = b0 ^ b1 and q = q0 ^ q1:
//   q0 = a0&b0 ^ [a0&b1 ^ z]      q1 = a1&b1 ^ [a1&b0 ^ z]
// The operands must come from registers clocked on the rising edge (the
// pipeline or stage register in front of the gadget), so they are stable for
// the whole cycle. On the falling edge of a cycle with en high, the two
// cross-domain products are refreshed with the fresh random word z and
// stored in their own registers; that register stage keeps glitches from
// combining the two domains. The inner-domain products are combinational.
// Timing: operands stable from the rising edge of cycle t and en high in t
// give a result valid from the falling edge of t to the end of t, so a user
// samples it at the next rising edge: one cycle per gadget. With en low the
// cross-domain registers hold, and so does q while the operands hold.
// The rising/falling-edge split and the single cycle follow the extension's
// description of the gadget it reuses; en, which lets the stages of a unit
// share one random word, is this design's.
module dom_and #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] a0,
  input  logic [WIDTH-1:0] a1,
  input  logic [WIDTH-1:0] b0,
  input  logic [WIDTH-1:0] b1,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] q0,
  output logic [WIDTH-1:0] q1
);

  logic [WIDTH-1:0] x01_q, x10_q;

  always_ff @(negedge clk) begin
    if (en) begin
      x01_q <= (a0 & b1) ^ z;
      x10_q <= (a1 & b0) ^ z;
    end
  end

  always_comb begin
    q0 = (a0 & b0) ^ x01_q;
    q1 = (a1 & b1) ^ x10_q;
  end

endmodule
