// Execution path of the masked cmov / cmpeq / cmpgt instructions.
//
// The extension adds three masked instructions to an in-order RISC-V core
// whose registers hold Boolean share pairs. This module is the part of that
// core the extension touches, as a three-stage pipe:
//   ID  decode (mask_ise_decoder), read up to three share pairs from the
//       register file (rs1, rs2 and, for cmov, rd) and forward younger
//       results (mask_fwd_unit);
//   EX  masked ALU (masked_alu); the stage register holds the operands,
//       the ALU starts in the stage's first cycle, and the stage stalls
//       everything behind it until the unit is done: it is occupied for
//       1 (cmov), 5 (cmpeq) or 6 (cmpgt) cycles;
//   WB  write the result pair back to the register file.
// Only the third operand's path into the ALU is new compared with a core
// that has two sources; it is routed nowhere else.
// Instruction interface: instr/instr_valid with instr_ready (a word is taken
// in a cycle where both are high). Words that are not one of the three
// instructions are dropped and flagged on other_instr (the rest of the core
// executes them). The ext_* ports stand for the rest of the core's access
// to the register file: a pair write (loads) and a pair read; use them only
// while idle is high. rnd must carry RND_W fresh random bits every cycle.
// Values on all pair ports are in register representation: share 1 bit-
// reversed. Status outputs: retire (one per written-back instruction),
// stall (an instruction waits in ID), fwd_ex / fwd_wb (per source, a value
// was forwarded from EX / WB this cycle).
// The stages, the three-operand register read, the forwarding of a third
// operand and the unit latencies follow the extension's description; the
// pipe depth, the handshakes and the ext/status ports are this design's.
module mask_ise_top
  import mask_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             instr_valid,
  input  logic [31:0]      instr,
  output logic             instr_ready,
  input  logic [RND_W-1:0] rnd,
  input  logic             ext_we,
  input  logic [4:0]       ext_waddr,
  input  mword_t           ext_wdata,
  input  logic [4:0]       ext_raddr,
  output mword_t           ext_rdata,
  output logic             idle,
  output logic             retire,
  output logic             other_instr,
  output logic             stall,
  output logic [2:0]       fwd_ex,
  output logic [2:0]       fwd_wb
);

  // ---------------- ID stage ----------------
  logic        id_valid;
  logic [31:0] id_instr;
  logic        dec_valid, dec_reads_rd;
  mop_e        dec_op;
  logic [4:0]  dec_rs1, dec_rs2, dec_rd;
  logic [4:0]  src_addr [3];
  mword_t      rf_data  [3];
  mword_t      opnd     [3];
  logic        hazard, id_go, ex_free;

  // ---------------- EX stage ----------------
  logic        ex_valid, ex_started;
  mop_e        ex_op;
  logic [4:0]  ex_rd;
  mword_t      ex_opnd [3];
  logic        alu_start, alu_busy, alu_done;
  mword_t      alu_res;

  // ---------------- WB stage ----------------
  logic        wb_valid;
  logic [4:0]  wb_rd;
  mword_t      wb_res;

  mask_ise_decoder u_dec (
    .instr (id_instr), .valid (dec_valid), .op (dec_op),
    .rs1 (dec_rs1), .rs2 (dec_rs2), .rd (dec_rd), .reads_rd (dec_reads_rd)
  );

  assign src_addr[0] = dec_rs1;
  assign src_addr[1] = dec_rs2;
  assign src_addr[2] = dec_rd;

  masked_regfile u_rf (
    .clk (clk),
    .ra1 (src_addr[0]), .ra2 (src_addr[1]), .ra3 (src_addr[2]),
    .rd1 (rf_data[0]),  .rd2 (rf_data[1]),  .rd3 (rf_data[2]),
    .wb_we (wb_valid), .wb_wa (wb_rd), .wb_wd (wb_res),
    .ext_we (ext_we), .ext_wa (ext_waddr), .ext_wd (ext_wdata),
    .ext_raddr (ext_raddr), .ext_rdata (ext_rdata)
  );

  mask_fwd_unit u_fwd (
    .src_addr (src_addr),
    .src_used ({dec_reads_rd, dec_valid, dec_valid}),
    .rf_data  (rf_data),
    .ex_valid (ex_valid), .ex_rd (ex_rd), .ex_done (alu_done), .ex_res (alu_res),
    .wb_valid (wb_valid), .wb_rd (wb_rd), .wb_res (wb_res),
    .opnd (opnd), .fwd_ex (fwd_ex), .fwd_wb (fwd_wb), .hazard (hazard)
  );

  // EX can take a new instruction when empty or finishing this cycle.
  assign ex_free     = !ex_valid || alu_done;
  assign id_go       = id_valid && dec_valid && ex_free && !hazard;
  assign instr_ready = !id_valid || !dec_valid || id_go;
  assign other_instr = id_valid && !dec_valid;
  assign stall       = id_valid && dec_valid && !id_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_valid <= 1'b0;
      id_instr <= '0;
    end else if (instr_ready) begin
      id_valid <= instr_valid;
      id_instr <= instr;
    end
  end

  // ---------------- EX ----------------
  assign alu_start = ex_valid && !ex_started;

  masked_alu u_alu (
    .clk (clk), .rst_n (rst_n), .start (alu_start), .op (ex_op),
    .rs1 (ex_opnd[0]), .rs2 (ex_opnd[1]), .rd_in (ex_opnd[2]),
    .z (rnd), .busy (alu_busy), .done (alu_done), .res (alu_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid   <= 1'b0;
      ex_started <= 1'b0;
      ex_op      <= MOP_CMOV;
      ex_rd      <= '0;
      ex_opnd    <= '{default: '0};
    end else if (ex_free) begin
      ex_valid   <= id_go;
      ex_started <= 1'b0;
      if (id_go) begin
        ex_op   <= dec_op;
        ex_rd   <= dec_rd;
        ex_opnd <= opnd;
      end
    end else if (alu_start) begin
      ex_started <= 1'b1;
    end
  end

  // ---------------- WB ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_rd    <= '0;
      wb_res   <= '0;
    end else begin
      wb_valid <= ex_valid && alu_done;
      if (ex_valid && alu_done) begin
        wb_rd  <= ex_rd;
        wb_res <= alu_res;
      end
    end
  end

  assign retire = wb_valid;
  assign idle   = !id_valid && !ex_valid && !wb_valid && !alu_busy;

  // The ALU reports done only for an operation this stage started.
  a_done_in_ex: assert property (@(posedge clk) disable iff (!rst_n)
    alu_done |-> ex_valid);

endmodule
