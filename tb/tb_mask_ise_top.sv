// End-to-end test of the masked-instruction execution path.
// Loads random masked values into all register pairs, then streams random
// programs of mask.b.cmov / cmpeq / cmpgt (with dependent back-to-back
// instructions and interleaved foreign instruction words) through the
// instruction port, and compares every register pair, read back and
// unmasked, with an unmasked reference model. Also checks the issue rate:
// an instruction occupies the execute stage for its unit latency, so a run
// of independent instructions of one kind retires one every 1 (cmov),
// 5 (cmpeq) or 6 (cmpgt) cycles. Counts and requires at least
// once: each instruction, a stall, forwarding from EX and from WB, forwarding
// of the cmov third operand, and a dropped foreign word.
module tb_mask_ise_top;
  import mask_pkg::*;
  logic clk = 0, rst_n = 0;
  logic instr_valid, instr_ready;
  logic [31:0] instr;
  logic [RND_W-1:0] rnd;
  logic ext_we;
  logic [4:0] ext_waddr, ext_raddr;
  mword_t ext_wdata, ext_rdata;
  logic idle, retire, other_instr, stall;
  logic [2:0] fwd_ex, fwd_wb;

  logic [31:0] model [16];
  int checks = 0, failures = 0;
  int n_cmov = 0, n_eq = 0, n_gt = 0, n_stall = 0, n_fex = 0, n_fwb = 0, n_f3 = 0;
  int n_other = 0, n_retire = 0;
  longint cyc = 0;

  mask_ise_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    rnd <= {$urandom, $urandom};
    cyc <= cyc + 1;
    if (rst_n) begin
      n_stall  += int'(stall);
      n_fex    += int'(|fwd_ex);
      n_fwb    += int'(|fwd_wb);
      n_f3     += int'(fwd_ex[2] | fwd_wb[2]);
      n_other  += int'(other_instr);
      n_retire += int'(retire);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mword_t rshare(input logic [31:0] v);
    logic [31:0] r = $urandom;
    return '{s0: v ^ r, s1: bitrev(r)};
  endfunction

  function automatic logic [31:0] enc(input logic [2:0] f3, input logic [4:0] d,
                                      input logic [4:0] a, input logic [4:0] b);
    return {7'h7c, b, a, f3, d, 7'h5b};
  endfunction

  // random register address of pairs 1..15 (either register of the pair)
  function automatic logic [4:0] rreg();
    return 5'($urandom_range(2, 31));
  endfunction

  task automatic load(input int p, input logic [31:0] v);
    @(negedge clk);
    ext_we = 1; ext_waddr = 5'(2 * p); ext_wdata = rshare(v);
    model[p] = v;
    @(negedge clk);
    ext_we = 0;
  endtask

  task automatic issue(input logic [31:0] w);
    instr_valid = 1; instr = w;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    #1;
    instr_valid = 0;
  endtask

  // issue one masked instruction and update the reference model
  task automatic exec(input logic [2:0] f3, input logic [4:0] d, input logic [4:0] a,
                      input logic [4:0] b);
    int pd = d / 2, pa = a / 2, pb = b / 2;
    issue(enc(f3, d, a, b));
    unique case (f3)
      3'd0: begin model[pd] = model[pb][0] ? model[pa] : model[pd]; n_cmov++; end
      3'd1: begin model[pd] = {31'b0, model[pa] == model[pb]};      n_eq++;   end
      default: begin model[pd] = {31'b0, model[pa] > model[pb]};    n_gt++;   end
    endcase
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (!idle) @(posedge clk);
  endtask

  task automatic compare_all(input string tag);
    for (int p = 1; p < 16; p++) begin
      @(negedge clk);
      ext_raddr = 5'(2 * p + 1);
      #1;
      checks++;
      if ((ext_rdata.s0 ^ bitrev(ext_rdata.s1)) !== model[p]) begin
        failures++;
        $display("FAIL %s pair %0d got=%h exp=%h", tag, p,
                 ext_rdata.s0 ^ bitrev(ext_rdata.s1), model[p]);
      end
    end
  endtask

  // independent run of n instructions of one kind; returns retire spacing
  task automatic rate(input logic [2:0] f3, input int expect_gap);
    longint t_first, t_last;
    int r0;
    for (int p = 1; p < 16; p++) load(p, (p % 3 == 0) ? 32'h5 : $urandom);
    r0 = n_retire;
    fork
      begin
        for (int k = 0; k < 8; k++) exec(f3, 5'(2 * (k + 1)), 5'(18 + 2 * (k % 3)), 5'(24 + 2 * (k % 2)));
      end
      begin
        @(posedge clk iff retire); t_first = cyc;
        repeat (7) @(posedge clk iff retire);
        t_last = cyc;
      end
    join
    wait_idle();
    checks++;
    if ((t_last - t_first) != longint'(7 * expect_gap)) begin
      failures++;
      $display("FAIL rate f3=%0d: 8 retires over %0d cycles, expected %0d", f3,
               t_last - t_first, 7 * expect_gap);
    end
    compare_all("rate");
  endtask

  initial begin
    instr_valid = 0; instr = '0; ext_we = 0; ext_waddr = '0; ext_wdata = '0; ext_raddr = '0;
    rnd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    model[0] = 0;

    // issue rates
    rate(3'd0, LAT_CMOV);
    rate(3'd1, LAT_CMPEQ);
    rate(3'd2, LAT_ADD);

    // random programs
    for (int prog = 0; prog < 40; prog++) begin
      for (int p = 1; p < 16; p++) begin
        logic [31:0] v = $urandom;
        if (p % 4 == 0) v = 32'($urandom_range(0, 3));
        load(p, v);
      end
      for (int k = 0; k < 40; k++) begin
        logic [4:0] d, a, b;
        logic [2:0] f3;
        d = rreg(); a = rreg(); b = rreg();
        f3 = 3'($urandom_range(0, 2));
        if (k % 9 == 4) issue(32'h00a50533);            // add x10,x10,x10: not ours
        if (k % 3 == 1) a = d;                          // read the previous result soon
        exec(f3, d, a, b);
      end
      wait_idle();
      compare_all("prog");
    end

    // BIKE-style cmov chain: each cmov's third operand is the previous rd
    for (int p = 1; p < 16; p++) load(p, $urandom | 32'h1);
    for (int k = 0; k < 12; k++) exec(3'd0, 5'd4, 5'(6 + 2 * (k % 4)), 5'd30);
    wait_idle();
    compare_all("chain");

    checks++;
    if (n_cmov == 0 || n_eq == 0 || n_gt == 0 || n_stall == 0 || n_fex == 0 || n_fwb == 0
        || n_f3 == 0 || n_other == 0) begin
      failures++;
      $display("FAIL coverage cmov=%0d eq=%0d gt=%0d stall=%0d fex=%0d fwb=%0d f3=%0d other=%0d",
               n_cmov, n_eq, n_gt, n_stall, n_fex, n_fwb, n_f3, n_other);
    end
    checks++;
    if (n_retire != n_cmov + n_eq + n_gt) begin
      failures++; $display("FAIL retired %0d, issued %0d", n_retire, n_cmov + n_eq + n_gt);
    end
    $display("counts: cmov=%0d cmpeq=%0d cmpgt=%0d stall_cycles=%0d fwd_ex=%0d fwd_wb=%0d fwd_rd=%0d foreign=%0d",
             n_cmov, n_eq, n_gt, n_stall, n_fex, n_fwb, n_f3, n_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
