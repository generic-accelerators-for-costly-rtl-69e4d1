// Masked ALU of the extension: cmov, cmpeq, cmpgt, and the add/sub of the
// masked adder whose carry cmpgt reuses.
//
// Operands arrive as share pairs in register representation (share 1 bit-
// reversed). The ALU restores natural bit order, runs the selected unit, and
// reverses share 1 of the result again. Operand roles:
//   cmov : rd_in is the destination, rs1 the value moved, rs2 the condition
//          (bit 0 of each share); result = rs2 ? rs1 : rd_in
//   cmpeq: result bit 0 = (rs1 == rs2)
//   cmpgt: result bit 0 = (rs1 > rs2), unsigned; the carry of rs2 - rs1
//   add  : rs1 + rs2         sub: rs1 - rs2
// Handshake: raise start for one cycle with op; the operands must come from
// rising-edge registers and stay stable from that cycle until done. An
// operation occupies the ALU for LAT cycles, the start cycle included
// (cmov 1, cmpeq 5, cmpgt/add/sub 6); done is high in the last of them and
// res is valid in that cycle only, from its falling edge on (sample it at
// the next rising edge). For cmov, done comes in the start cycle itself.
// busy is high in the cycles after start while a multi-cycle operation runs.
// z must carry RND_W fresh random bits every cycle; the units share it
// because only one gadget stage is enabled per cycle.
// Unit latencies, operand roles of cmov and the bit reversal follow the
// extension's description; the start/done handshake, the cmpgt operand order
// and the result encoding (bit 0, other bits zero) are this design's choices.
module masked_alu
  import mask_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  mop_e             op,
  input  mword_t           rs1,
  input  mword_t           rs2,
  input  mword_t           rd_in,
  input  logic [RND_W-1:0] z,
  output logic             busy,
  output logic             done,
  output mword_t           res
);

  mword_t a1, a2, ad;              // natural-order operands
  mword_t r_cmov, r_eq, r_sum, r_cout, r_nat;
  mop_e   op_q, cur_op;
  logic [2:0] cnt;
  logic [2:0] lat;
  logic st_cmov, st_eq, st_add, add_sub;
  mword_t add_a, add_b;

  always_comb begin
    a1 = '{s0: rs1.s0,   s1: bitrev(rs1.s1)};
    a2 = '{s0: rs2.s0,   s1: bitrev(rs2.s1)};
    ad = '{s0: rd_in.s0, s1: bitrev(rd_in.s1)};
  end

  // Start strobes per unit.
  always_comb begin
    st_cmov = start && (op == MOP_CMOV);
    st_eq   = start && (op == MOP_CMPEQ);
    st_add  = start && (op inside {MOP_CMPGT, MOP_ADD, MOP_SUB});
    add_sub = (op != MOP_ADD);
    add_a   = (op == MOP_CMPGT) ? a2 : a1;
    add_b   = (op == MOP_CMPGT) ? a1 : a2;
  end

  mask_cmov u_cmov (
    .clk (clk), .start (st_cmov),
    .dest (ad), .src (a1), .cond (a2),
    .z (z[XLEN-1:0]), .res (r_cmov)
  );

  mask_cmpeq u_cmpeq (
    .clk (clk), .rst_n (rst_n), .start (st_eq),
    .a (a1), .b (a2),
    .z (z[XLEN-1:0]), .res (r_eq)
  );

  mask_ks_adder u_add (
    .clk (clk), .rst_n (rst_n), .start (st_add), .sub (add_sub),
    .a (add_a), .b (add_b),
    .z (z[2*XLEN-1:0]), .sum (r_sum), .cout (r_cout)
  );

  // Sequencer: cnt counts the cycles after start.
  always_comb begin
    unique case (cur_op)
      MOP_CMOV:  lat = 3'(LAT_CMOV);
      MOP_CMPEQ: lat = 3'(LAT_CMPEQ);
      default:   lat = 3'(LAT_ADD);
    endcase
  end

  assign cur_op = busy ? op_q : op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      op_q <= MOP_CMOV;
    end else if (start && !busy) begin
      busy <= (lat > 3'd1);
      cnt  <= 3'd1;
      op_q <= op;
    end else if (busy) begin
      if (done) busy <= 1'b0;
      cnt <= cnt + 3'd1;
    end
  end

  assign done = busy ? (cnt == lat - 3'd1) : (start && lat == 3'd1);

  always_comb begin
    unique case (cur_op)
      MOP_CMOV:  r_nat = r_cmov;
      MOP_CMPEQ: r_nat = r_eq;
      MOP_CMPGT: r_nat = r_cout;
      default:   r_nat = r_sum;
    endcase
    res = '{s0: r_nat.s0, s1: bitrev(r_nat.s1)};
  end

  // A new operation may only start when the previous one has finished.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
