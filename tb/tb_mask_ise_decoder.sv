// Self-checking test of the instruction decoder: the three encodings with
// random register fields, neighbouring encodings that must be rejected
// (other funct3, funct7 or opcode), and the cmov third-operand flag.
module tb_mask_ise_decoder;
  import mask_pkg::*;
  logic [31:0] instr;
  logic valid, reads_rd;
  mop_e op;
  logic [4:0] rs1, rs2, rd;
  int checks = 0, failures = 0;

  mask_ise_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] enc(input logic [6:0] f7, input logic [4:0] r2,
                                      input logic [4:0] r1, input logic [2:0] f3,
                                      input logic [4:0] d, input logic [6:0] opc);
    return {f7, r2, r1, f3, d, opc};
  endfunction

  initial begin
    logic [4:0] a, b, c;
    logic [2:0] f3;
    logic exp_v;
    mop_e exp_op;
    for (int t = 0; t < 2000; t++) begin
      a = 5'($urandom); b = 5'($urandom); c = 5'($urandom);
      f3 = 3'($urandom);
      instr = enc(7'h7c, b, a, f3, c, 7'h5b);
      if (t % 5 == 1) instr[31:25] = 7'($urandom);
      if (t % 5 == 2) instr[6:0]   = 7'($urandom);
      exp_v = (instr[31:25] == 7'h7c) && (instr[6:0] == 7'h5b) && (f3 <= 3'd2);
      exp_op = (f3 == 3'd0) ? MOP_CMOV : (f3 == 3'd1) ? MOP_CMPEQ : MOP_CMPGT;
      #1;
      checks++;
      if (valid !== exp_v || (exp_v && (op !== exp_op || rs1 !== a || rs2 !== b || rd !== c))
          || reads_rd !== (exp_v && f3 == 3'd0)) begin
        failures++;
        $display("FAIL instr=%h valid=%0d op=%0d rs1=%0d rs2=%0d rd=%0d rrd=%0d",
                 instr, valid, op, rs1, rs2, rd, reads_rd);
      end
    end
    // Fixed words: cmov x6, x8, x10 / cmpeq / cmpgt
    instr = 32'hf8a4035b; #1; checks++;
    if (!(valid && op == MOP_CMOV && rd == 5'd6 && rs1 == 5'd8 && rs2 == 5'd10 && reads_rd)) begin
      failures++; $display("FAIL fixed cmov");
    end
    instr = 32'hf8a4135b; #1; checks++;
    if (!(valid && op == MOP_CMPEQ && !reads_rd)) begin failures++; $display("FAIL fixed cmpeq"); end
    instr = 32'hf8a4235b; #1; checks++;
    if (!(valid && op == MOP_CMPGT && !reads_rd)) begin failures++; $display("FAIL fixed cmpgt"); end
    instr = 32'hf8a4335b; #1; checks++;
    if (valid) begin failures++; $display("FAIL funct3=3 accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
