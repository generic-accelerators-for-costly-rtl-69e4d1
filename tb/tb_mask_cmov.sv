// Self-checking test of the masked cmov unit: random destination, value and
// condition shares (condition bit 0 only, upper bits random noise); the
// recombined result in the cycle of start (from its falling edge on) must
// be cond ? src : dest.
module tb_mask_cmov;
  import mask_pkg::*;
  logic clk = 0;
  logic start;
  mword_t dest, src, cond, res;
  logic [XLEN-1:0] z;
  int checks = 0, failures = 0;

  mask_cmov dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) z <= $urandom;

  initial begin
    repeat (3000) @(posedge clk);
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
    logic [31:0] d, s, exp;
    logic c;
    start = 0; z = 0;
    dest = '0; src = '0; cond = '0;
    @(posedge clk); #1;
    for (int t = 0; t < 500; t++) begin
      d = $urandom; s = $urandom; c = 1'($urandom);
      dest = share(d); src = share(s);
      cond = share({$urandom_range(0, 1) == 1 ? 31'h7fffffff : 31'h0, c});
      exp = c ? s : d;
      start = 1;
      @(negedge clk); #1;
      checks++;
      if ((res.s0 ^ res.s1) !== exp) begin
        failures++;
        $display("FAIL t=%0d c=%0d d=%h s=%h got=%h", t, c, d, s, res.s0 ^ res.s1);
      end
      @(posedge clk); #1;
      start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
