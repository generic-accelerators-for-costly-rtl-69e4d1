// Masked Kogge-Stone adder/subtractor on Boolean shares, with carry-out.
//
// add: sum = a + b.  sub: sum = a - b, computed as ~(~a + b), where the
// inversions touch share 0 only. The adder forms generate g = x & y (one DOM
// AND) and propagate p = x ^ y (share-wise), then runs five prefix levels
// with distance d = 1, 2, 4, 8, 16:
//   G'[i] = G[i] ^ (P[i] & G[i-d])      P'[i] = P[i] & P[i-d]
// (the XOR is exact because G and P of one group are never both 1), each
// level one cycle of DOM gadgets whose outputs are captured in rising-edge
// stage registers. sum = p ^ (G << 1).
// The carry-out is G[31] of the last level and leaves in shared form as
// bit 0 of cout. For sub it is the carry of ~a + b, which is 1 exactly when
// b > a (unsigned): the "larger value subtracted from a smaller one" flag
// that the cmpgt instruction returns.
// Timing: operands and sub stable from the cycle of start (t) on; the
// generate gadget works in t, level k in t+k, and sum/cout are valid in
// cycle t+5: six cycles in all. Only the active level's gadgets are
// enabled, so levels share one random word: z[31:0] for the generate gadget
// and the G product, z[63:32] for the P product.
// The Kogge-Stone structure on Boolean shares, the shared carry output and
// the six cycles follow the extension's description; the subtraction
// identity, the enable scheme and the use of randomness are this design's.
module mask_ks_adder
  import mask_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              sub,
  input  mword_t            a,
  input  mword_t            b,
  input  logic [2*XLEN-1:0] z,
  output mword_t            sum,
  output mword_t            cout
);

  localparam int unsigned LEVELS = 5;

  mword_t x, y, p, g;
  logic [LEVELS:0] en;          // en[0]: generate gadget, en[k]: level k

  // G and P entering level k (stage registers); G leaving the last level.
  mword_t G [1:LEVELS];
  mword_t P [1:LEVELS];
  mword_t g_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en[LEVELS:1] <= '0;
    else        en[LEVELS:1] <= en[LEVELS-1:0];
  end
  assign en[0] = start;

  always_comb begin
    x.s0 = sub ? ~a.s0 : a.s0;
    x.s1 = a.s1;
    y    = b;
    p.s0 = x.s0 ^ y.s0;
    p.s1 = x.s1 ^ y.s1;
  end

  dom_and #(.WIDTH(XLEN)) u_gen (
    .clk (clk), .en (en[0]),
    .a0 (x.s0), .a1 (x.s1), .b0 (y.s0), .b1 (y.s1),
    .z  (z[XLEN-1:0]),
    .q0 (g.s0), .q1 (g.s1)
  );

  always_ff @(posedge clk) begin
    if (en[0]) begin
      G[1] <= g;
      P[1] <= p;
    end
  end

  for (genvar k = 1; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned D = 1 << (k - 1);
    logic [XLEN-1:0] gl0, gl1, pg0, pg1;
    mword_t          g_next;

    assign gl0 = G[k].s0 << D;
    assign gl1 = G[k].s1 << D;

    dom_and #(.WIDTH(XLEN)) u_g (
      .clk (clk), .en (en[k]),
      .a0 (P[k].s0), .a1 (P[k].s1), .b0 (gl0), .b1 (gl1),
      .z  (z[XLEN-1:0]),
      .q0 (pg0), .q1 (pg1)
    );

    assign g_next.s0 = G[k].s0 ^ pg0;
    assign g_next.s1 = G[k].s1 ^ pg1;

    if (k < LEVELS) begin : g_p
      logic [XLEN-1:0] pl0, pl1, pp0, pp1;
      // Bits below D have no partner: AND them with a constant 1 (1 ^ 0).
      assign pl0 = (P[k].s0 << D) | ((XLEN'(1) << D) - XLEN'(1));
      assign pl1 =  P[k].s1 << D;
      dom_and #(.WIDTH(XLEN)) u_p (
        .clk (clk), .en (en[k]),
        .a0 (P[k].s0), .a1 (P[k].s1), .b0 (pl0), .b1 (pl1),
        .z  (z[2*XLEN-1:XLEN]),
        .q0 (pp0), .q1 (pp1)
      );
      always_ff @(posedge clk) begin
        if (en[k]) begin
          G[k+1]    <= g_next;
          P[k+1].s0 <= pp0;
          P[k+1].s1 <= pp1;
        end
      end
    end else begin : g_last
      assign g_out = g_next;
    end
  end

  always_comb begin
    // p is recomputed from the operands, which are still held.
    sum.s0  = p.s0 ^ (g_out.s0 << 1);
    sum.s1  = p.s1 ^ (g_out.s1 << 1);
    if (sub) sum.s0 = ~sum.s0;
    cout.s0 = {{(XLEN-1){1'b0}}, g_out.s0[XLEN-1]};
    cout.s1 = {{(XLEN-1){1'b0}}, g_out.s1[XLEN-1]};
  end

endmodule
