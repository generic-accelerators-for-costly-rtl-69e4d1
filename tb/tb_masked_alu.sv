// Self-checking test of the masked ALU: random operations (cmov, cmpeq,
// cmpgt, add, sub) on operands in register representation (share 1 bit-
// reversed). Checks the recombined result, that share 1 of the result comes
// back bit-reversed, and that done comes in exactly the LAT-th cycle
// counted from the start cycle (cmov 1, cmpeq 5, others 6).
module tb_masked_alu;
  import mask_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  mop_e op;
  mword_t rs1, rs2, rd_in, res;
  logic [RND_W-1:0] z;
  int checks = 0, failures = 0;
  int n_op [5];

  masked_alu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) z <= {$urandom, $urandom};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register representation of a fresh sharing of v
  function automatic mword_t rshare(input logic [31:0] v);
    logic [31:0] r = $urandom;
    return '{s0: v ^ r, s1: bitrev(r)};
  endfunction

  function automatic logic [31:0] unmask(input mword_t m);
    return m.s0 ^ bitrev(m.s1);
  endfunction

  initial begin
    logic [31:0] a, b, d, exp;
    int lat, cyc;
    start = 0; op = MOP_CMOV; rs1 = '0; rs2 = '0; rd_in = '0; z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 1000; t++) begin
      op = mop_e'($urandom_range(0, 4));
      a = $urandom; b = $urandom; d = $urandom;
      if (t % 4 == 0) b = a;
      if (op == MOP_CMOV) b = {$urandom} & 32'hfffffffe | 32'($urandom_range(0, 1));
      unique case (op)
        MOP_CMOV:  begin exp = b[0] ? a : d;          lat = LAT_CMOV;  end
        MOP_CMPEQ: begin exp = {31'b0, a == b};       lat = LAT_CMPEQ; end
        MOP_CMPGT: begin exp = {31'b0, a > b};        lat = LAT_ADD;   end
        MOP_ADD:   begin exp = a + b;                 lat = LAT_ADD;   end
        default:   begin exp = a - b;                 lat = LAT_ADD;   end
      endcase
      n_op[int'(op)]++;
      rs1 = rshare(a); rs2 = rshare(b); rd_in = rshare(d);
      start = 1;
      cyc = 1;
      #1;
      while (!done && cyc < 20) begin
        @(posedge clk); #1; cyc++;
        start = 0;
      end
      @(negedge clk); #1;
      checks++;
      if (cyc != lat) begin
        failures++;
        $display("FAIL latency op=%s got=%0d exp=%0d", op.name(), cyc, lat);
      end
      checks++;
      if (unmask(res) !== exp) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h d=%h got=%h exp=%h", op.name(), a, b, d, unmask(res), exp);
      end
      @(posedge clk); #1;
      start = 0;
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL op %0d never ran", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
