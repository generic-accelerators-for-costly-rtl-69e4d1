// Self-checking test of the masked equality unit: equal and unequal pairs
// (including single-bit differences at every position), result bit 0 =
// (a == b) with upper bits zero, valid in the fifth cycle counted from the
// start cycle and not earlier.
module tb_mask_cmpeq;
  import mask_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start;
  mword_t a, b, res;
  logic [XLEN-1:0] z;
  int checks = 0, failures = 0;

  mask_cmpeq dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) z <= $urandom;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mword_t share(input logic [31:0] v);
    logic [31:0] r = $urandom;
    return '{s0: v ^ r, s1: r};
  endfunction

  initial begin
    logic [31:0] va, vb;
    logic exp;
    start = 0; z = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 400; t++) begin
      va = $urandom;
      case (t % 4)
        0: vb = va;
        1: vb = va ^ (32'h1 << (t % 32));
        2: vb = $urandom;
        default: vb = va ^ (32'h80000001 >> (t % 7));
      endcase
      exp = (va == vb);
      a = share(va); b = share(vb);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      repeat (3) @(posedge clk);
      @(negedge clk); #1;
      checks++;
      if ((res.s0 ^ res.s1) !== {31'b0, exp}) begin
        failures++;
        $display("FAIL t=%0d a=%h b=%h got=%h exp=%0d", t, va, vb, res.s0 ^ res.s1, exp);
      end
      @(posedge clk); #1;
    end
    // latency: an outcome that differs from the previous one must not show
    // before the fifth cycle and must show in it
    va = 32'h1234; a = share(va); b = share(va);  // equal -> 1
    start = 1; @(posedge clk); #1; start = 0;
    repeat (4) @(posedge clk); #1;
    b = share(va ^ 1);                             // now unequal -> 0
    start = 1; @(posedge clk); #1; start = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); #1;
    checks++;
    if ((res.s0 ^ res.s1) !== 32'h1) begin
      failures++; $display("FAIL latency: result changed in cycle 4");
    end
    @(posedge clk); @(negedge clk); #1;
    checks++;
    if ((res.s0 ^ res.s1) !== 32'h0) begin
      failures++; $display("FAIL latency: result not ready in cycle 5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
