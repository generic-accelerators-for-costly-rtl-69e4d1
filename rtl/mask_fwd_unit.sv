// Forwarding and hazard unit for the three masked source operands.
//
// For each source (rs1, rs2 and, for cmov, rd read as third operand) it
// picks the youngest value of that register pair:
//   1. the masked ALU result, when the execute stage writes the pair and its
//      result is valid this cycle (ex_done),
//   2. the write-back stage's result, when it writes the pair this cycle,
//   3. the register file otherwise.
// A used source whose pair is the destination of an execute-stage operation
// that has not finished raises hazard: decode must wait. Pairs are compared
// on address bits [4:1]; pair 0 (x0/x1) is never forwarded. Shares are moved
// as they are (share 1 stays bit-reversed), so no share meets the other.
// Purely combinational. That forwarding and hazard detection cover a third
// operand follows the extension's description; the priorities and the pair
// rule are this design's.
module mask_fwd_unit
  import mask_pkg::*;
(
  input  logic [4:0]    src_addr [3],
  input  logic [2:0]    src_used,
  input  mword_t        rf_data  [3],
  input  logic          ex_valid,
  input  logic [4:0]    ex_rd,
  input  logic          ex_done,
  input  mword_t        ex_res,
  input  logic          wb_valid,
  input  logic [4:0]    wb_rd,
  input  mword_t        wb_res,
  output mword_t        opnd     [3],
  output logic [2:0]    fwd_ex,
  output logic [2:0]    fwd_wb,
  output logic          hazard
);

  always_comb begin
    hazard = 1'b0;
    for (int i = 0; i < 3; i++) begin
      logic m_ex, m_wb, nz;
      nz   = (src_addr[i][4:1] != 4'd0);
      m_ex = src_used[i] && nz && ex_valid && (ex_rd[4:1] == src_addr[i][4:1]);
      m_wb = src_used[i] && nz && wb_valid && (wb_rd[4:1] == src_addr[i][4:1]);
      fwd_ex[i] = m_ex && ex_done;
      fwd_wb[i] = m_wb && !m_ex;
      if (m_ex && !ex_done) hazard = 1'b1;
      if (fwd_ex[i])      opnd[i] = ex_res;
      else if (fwd_wb[i]) opnd[i] = wb_res;
      else                opnd[i] = rf_data[i];
    end
  end

endmodule
