// Self-checking test of the masked Kogge-Stone adder/subtractor: random and
// corner operands for add and sub; checks sum and the shared carry-out
// (add: unsigned overflow; sub a-b: 1 when b > a) in the sixth cycle
// counted from the start cycle, and that it is not yet there in the fifth.
module tb_mask_ks_adder;
  import mask_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, sub;
  mword_t a, b, sum, cout;
  logic [2*XLEN-1:0] z;
  int checks = 0, failures = 0;

  mask_ks_adder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) z <= {$urandom, $urandom};

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mword_t share(input logic [31:0] v);
    logic [31:0] r = $urandom;
    return '{s0: v ^ r, s1: r};
  endfunction

  task automatic run(input logic [31:0] va, input logic [31:0] vb, input logic s);
    logic [32:0] full;
    logic [31:0] exp_sum;
    logic exp_c;
    if (s) begin
      exp_sum = va - vb;
      exp_c   = (vb > va);
    end else begin
      full    = {1'b0, va} + {1'b0, vb};
      exp_sum = full[31:0];
      exp_c   = full[32];
    end
    a = share(va); b = share(vb); sub = s;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    repeat (4) @(posedge clk);
    @(negedge clk); #1;
    checks++;
    if ((sum.s0 ^ sum.s1) !== exp_sum || (cout.s0 ^ cout.s1) !== {31'b0, exp_c}) begin
      failures++;
      $display("FAIL sub=%0d a=%h b=%h sum=%h exp=%h c=%0d exp_c=%0d", s, va, vb,
               sum.s0 ^ sum.s1, exp_sum, (cout.s0 ^ cout.s1), exp_c);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    start = 0; sub = 0; a = '0; b = '0; z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(32'hffffffff, 32'h1, 0);
    run(32'h0, 32'h1, 1);
    run(32'h1, 32'h0, 1);
    run(32'h5, 32'h5, 1);
    run(32'h7fffffff, 32'h1, 0);
    run(32'h80000000, 32'h80000000, 0);
    for (int t = 0; t < 600; t++) begin
      logic [31:0] va, vb;
      va = $urandom; vb = $urandom;
      if (t % 3 == 0) vb = va + 32'($urandom_range(0, 2)) - 32'd1;
      run(va, vb, 1'(t % 2));
    end
    // latency: a carry across all 32 bits is not complete in cycle 5
    a = share(32'h0); b = share(32'h0); sub = 0;
    start = 1; @(posedge clk); #1; start = 0;
    repeat (5) @(posedge clk); #1;
    a = share(32'hffffffff); b = share(32'h1); sub = 0;
    start = 1; @(posedge clk); #1; start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); #1;
    checks++;
    if ((cout.s0 ^ cout.s1) === 32'h1 && (sum.s0 ^ sum.s1) === 32'h0) begin
      failures++; $display("FAIL latency: ready in cycle 5");
    end
    @(posedge clk); @(negedge clk); #1;
    checks++;
    if ((cout.s0 ^ cout.s1) !== 32'h1 || (sum.s0 ^ sum.s1) !== 32'h0) begin
      failures++; $display("FAIL latency: not ready in cycle 6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
