// Masked equality test (mask.b.cmpeq datapath).
//
// The two operands are XORed share by share; the 32-bit difference is then
// reduced by an OR tree whose stage k ORs adjacent bit pairs, halving the
// width: 32 -> 16 -> 8 -> 4 -> 2 -> 1 in five stages. Each masked OR is a DOM
// AND gadget with De Morgan inversions on share 0 only (x | y = ~(~x & ~y)).
// Stage 1 works directly on the (stable) operands; the output of each stage
// is captured in a rising-edge stage register in front of the next one, so
// each stage is one cycle. The tree yields 1 when the operands differ; the
// unit flips share 0 of that bit so that res = 1 means equal.
// Result: bit 0 of each share of res, all other bits zero.
// Timing: operands stable from the cycle of start (t) on; stage k works in
// cycle t+k-1 and res is valid in cycle t+4: five cycles in all. Only the
// stage holding valid data has its gadget enabled (one-hot valid chain), so
// all stages share one random word: stage k uses z[(32>>k)-1:0].
// The XOR/OR-tree structure, its five stages and five cycles follow the
// extension's description; the equal=1 polarity of the result and the
// enable scheme are this design's.
module mask_cmpeq
  import mask_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  mword_t          a,
  input  mword_t          b,
  input  logic [XLEN-1:0] z,
  output mword_t          res
);

  localparam int unsigned STAGES = 5;

  // lvl_s*[k]: the 32>>k wide vector entering stage k+1 (LSBs used).
  // Level 0 is the operand difference; levels 1..4 are stage registers.
  logic [XLEN-1:0]   lvl_s0 [STAGES];
  logic [XLEN-1:0]   lvl_s1 [STAGES];
  logic [STAGES-1:0] stage_en;            // stage_en[k]: stage k+1 active

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage_en[STAGES-1:1] <= '0;
    else        stage_en[STAGES-1:1] <= stage_en[STAGES-2:0];
  end
  assign stage_en[0] = start;

  always_comb begin
    lvl_s0[0] = a.s0 ^ b.s0;
    lvl_s1[0] = a.s1 ^ b.s1;
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    localparam int unsigned W = XLEN >> (k + 1);
    logic [W-1:0] x0, x1, y0, y1, q0, q1;
    always_comb begin
      for (int j = 0; j < int'(W); j++) begin
        x0[j] = ~lvl_s0[k][2*j];
        x1[j] =  lvl_s1[k][2*j];
        y0[j] = ~lvl_s0[k][2*j+1];
        y1[j] =  lvl_s1[k][2*j+1];
      end
    end
    dom_and #(.WIDTH(W)) u_or (
      .clk (clk), .en (stage_en[k]),
      .a0 (x0), .a1 (x1), .b0 (y0), .b1 (y1),
      .z  (z[W-1:0]),
      .q0 (q0), .q1 (q1)
    );
    if (k < STAGES - 1) begin : g_reg
      always_ff @(posedge clk) begin
        if (stage_en[k]) begin
          lvl_s0[k+1] <= XLEN'(~q0);
          lvl_s1[k+1] <= XLEN'(q1);
        end
      end
    end else begin : g_out
      assign res.s0 = {{(XLEN-1){1'b0}}, q0[0]};   // ~(~q0) : equal = 1
      assign res.s1 = {{(XLEN-1){1'b0}}, q1[0]};
    end
  end

endmodule
