// Workload test: masked CDT sampling for the three FrodoKEM parameter sets,
// run on the masked ALU with the testbench acting as the rest of the core.
// Per sample, a masked 16-bit random string is split into a 15-bit value r
// and a sign bit; r is compared against every table entry with cmpgt and the
// comparison bits are accumulated with masked additions; the sign then
// selects, by cmov, between the sum and its negation (a masked subtraction
// from zero). All intermediate values stay masked; only the final sample is
// recombined and compared with an unmasked model. n * 8 samples are drawn
// per parameter set and the ALU cycles are reported.
// The table contents are the published FrodoKEM CDF tables, which the
// extension's description does not list.
module tb_masked_alu_cdt;
  import mask_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  mop_e op;
  mword_t rs1, rs2, rd_in, res;
  logic [RND_W-1:0] z;
  int checks = 0, failures = 0;
  longint cyc = 0;

  masked_alu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) z <= {$urandom, $urandom};
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mword_t rshare(input logic [31:0] v);
    logic [31:0] r = $urandom;
    return '{s0: v ^ r, s1: bitrev(r)};
  endfunction

  function automatic logic [31:0] unmask(input mword_t m);
    return m.s0 ^ bitrev(m.s1);
  endfunction

  // one ALU operation; returns the masked result
  task automatic alu(input mop_e o, input mword_t a, input mword_t b,
                     input mword_t d, output mword_t r);
    @(posedge clk); #1;
    op = o; rs1 = a; rs2 = b; rd_in = d;
    start = 1;
    #1;
    while (!done) begin
      @(posedge clk); #1;
      start = 0;
    end
    @(negedge clk); #1;
    r = res;
    @(posedge clk); #1;
    start = 0;
  endtask

  // bit field of a masked word, taken share by share (a shift and a mask
  // are linear, so the field stays masked)
  function automatic mword_t field(input mword_t m, input int lsb, input int w);
    logic [31:0] s1n = bitrev(m.s1);
    logic [31:0] mask = (32'h1 << w) - 1;
    return '{s0: (m.s0 >> lsb) & mask, s1: bitrev((s1n >> lsb) & mask)};
  endfunction

  task automatic run_set(input string name, input int n, input int tlen,
                         input logic [15:0] tab [16]);
    longint t0;
    int nsamp = n * 8;
    int hist [int];
    t0 = cyc;
    for (int s = 0; s < nsamp; s++) begin
      logic [15:0] rnd = 16'($urandom);
      mword_t rm, r15, sgn, acc, c, neg, outm;
      int exp_mag, exp_val;
      rm  = rshare({16'b0, rnd});
      r15 = field(rm, 1, 15);
      sgn = field(rm, 0, 1);
      acc = rshare(32'd0);
      for (int j = 0; j < tlen; j++) begin
        alu(MOP_CMPGT, r15, rshare({16'b0, tab[j]}), rshare(32'd0), c);  // r > T[j]
        alu(MOP_ADD, acc, c, rshare(32'd0), acc);
      end
      alu(MOP_SUB, rshare(32'd0), acc, rshare(32'd0), neg);
      alu(MOP_CMOV, neg, sgn, acc, outm);                  // sign ? -acc : acc
      exp_mag = 0;
      for (int j = 0; j < tlen; j++) if (32'(rnd >> 1) > 32'(tab[j])) exp_mag++;
      exp_val = rnd[0] ? -exp_mag : exp_mag;
      hist[exp_val]++;
      checks++;
      if (unmask(outm) !== 32'(exp_val)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s rnd=%h got=%0d exp=%0d", name, rnd, $signed(unmask(outm)), exp_val);
      end
    end
    $display("%s: %0d samples, %0d table entries, %0d ALU cycles (%0d per sample), P(0)=%0d/%0d",
             name, nsamp, tlen, cyc - t0, (cyc - t0) / nsamp, hist[0], nsamp);
  endtask

  initial begin
    logic [15:0] t640 [16] = '{4643, 13363, 20579, 25843, 29227, 31145, 32103, 32525,
                               32689, 32745, 32762, 32766, 32767, 0, 0, 0};
    logic [15:0] t976 [16] = '{5638, 15915, 23689, 28571, 31116, 32217, 32613, 32731,
                               32760, 32766, 32767, 0, 0, 0, 0, 0};
    logic [15:0] t1344 [16] = '{9142, 23462, 30338, 32361, 32725, 32765, 32767,
                                0, 0, 0, 0, 0, 0, 0, 0, 0};
    start = 0; op = MOP_CMOV; rs1 = '0; rs2 = '0; rd_in = '0; z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_set("FrodoKEM-640", 640, 13, t640);
    run_set("FrodoKEM-976", 976, 11, t976);
    run_set("FrodoKEM-1344", 1344, 7, t1344);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
