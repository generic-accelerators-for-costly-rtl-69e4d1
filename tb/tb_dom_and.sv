// Self-checking test of the DOM AND gadget: random shares and randomness;
// checks that the recombined output equals a & b in the second half of the
// cycle in which the operands are applied with en, that the result holds in
// a following cycle with en low, and that the output shares are not the
// unmasked product (share 1 not constant zero).
module tb_dom_and;
  localparam int W = 32;
  logic clk = 0;
  logic en;
  logic [W-1:0] a0, a1, b0, b1, z, q0, q1;
  int checks = 0, failures = 0;

  dom_and dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // randomness changes right after every rising edge
  always @(posedge clk) z <= $urandom;

  initial begin
    logic [W-1:0] a, b, exp;
    int nz = 0;
    en = 0; a0 = 0; a1 = 0; b0 = 0; b1 = 0; z = 0;
    @(posedge clk); #1;
    for (int t = 0; t < 300; t++) begin
      a = $urandom; b = $urandom;
      if (t % 5 == 0) a = '1;
      a1 = $urandom; b1 = $urandom;
      a0 = a ^ a1; b0 = b ^ b1;
      en = 1;
      exp = a & b;
      @(negedge clk); #1;
      checks++;
      if ((q0 ^ q1) !== exp) begin
        failures++;
        $display("FAIL t=%0d a=%h b=%h got=%h exp=%h", t, a, b, q0 ^ q1, exp);
      end
      if (q1 != 0) nz++;
      // next cycle: en low, fresh z, same operands: result must hold
      @(posedge clk); #1;
      en = 0;
      @(negedge clk); #1;
      checks++;
      if ((q0 ^ q1) !== exp) begin
        failures++;
        $display("FAIL hold t=%0d", t);
      end
      @(posedge clk); #1;
    end
    checks++;
    if (nz < 250) begin failures++; $display("FAIL output share 1 mostly zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
