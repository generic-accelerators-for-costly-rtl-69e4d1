// Decoder for the three masked comparison/move instructions.
//
// All three are RISC-V R-type words with funct7 = 0x7c and opcode = 0x5b;
// funct3 selects the operation: 0 mask.b.cmov, 1 mask.b.cmpeq,
// 2 mask.b.cmpgt. cmov additionally reads its destination register as a
// third source (the old value that is kept when the condition is 0), which
// the decoder signals with reads_rd. Any other word gives valid = 0.
// Purely combinational. The encodings and the use of rd as third source
// follow the extension's definition; the output bundle is this design's.
module mask_ise_decoder
  import mask_pkg::*;
(
  input  logic [31:0] instr,
  output logic        valid,
  output mop_e        op,
  output logic [4:0]  rs1,
  output logic [4:0]  rs2,
  output logic [4:0]  rd,
  output logic        reads_rd
);

  logic [6:0] opcode, funct7;
  logic [2:0] funct3;

  always_comb begin
    opcode   = instr[6:0];
    rd       = instr[11:7];
    funct3   = instr[14:12];
    rs1      = instr[19:15];
    rs2      = instr[24:20];
    funct7   = instr[31:25];
    valid    = 1'b0;
    op       = MOP_CMOV;
    if (opcode == OPC_MASK && funct7 == F7_MASK_EX) begin
      unique case (funct3)
        F3_CMOV:  begin valid = 1'b1; op = MOP_CMOV;  end
        F3_CMPEQ: begin valid = 1'b1; op = MOP_CMPEQ; end
        F3_CMPGT: begin valid = 1'b1; op = MOP_CMPGT; end
        default:  valid = 1'b0;
      endcase
    end
    reads_rd = valid && (op == MOP_CMOV);
  end

endmodule
