// Workload test: three masked software kernels run on the execution path at
// full size, with the testbench acting as the rest of the core (in-order
// loads and stores of masked words through the register-file ports, loop
// control) and an unmasked model computing the expected results.
//  - Index-to-coefficient conversion for NTRU key generation (N = 677,
//    W = 254): N x W pairs of cmpeq + cmov turn W secret indices into a
//    0/1 coefficient vector. Checks every coefficient and that exactly
//    2*N*W masked instructions ran.
//  - Word-unit rotation of a BIKE-1 syndrome (r = 12323 bits, 386 words)
//    held as three copies: per bit of the secret word offset, a pass of
//    cmov v[j] <- v[j+i] over j = 0 .. r/32 + i. Checks the rotated words.
//  - Comparison sampling (N = 677, W = 254, l = 16): coefficient =
//    (floor(2^l * W / N) > random l-bit string), one cmpgt each.
// Prints the cycles each kernel took on this path.
module tb_mask_ise_workloads;
  import mask_pkg::*;
  localparam int N = 677, W = 254;       // I2C and comparison sampling
  localparam int RBITS = 12323;          // BIKE-1 block length
  localparam int SW = (RBITS + 31) / 32; // syndrome words
  localparam int LBITS = 16;

  logic clk = 0, rst_n = 0;
  logic instr_valid, instr_ready;
  logic [31:0] instr;
  logic [RND_W-1:0] rnd;
  logic ext_we;
  logic [4:0] ext_waddr, ext_raddr;
  mword_t ext_wdata, ext_rdata;
  logic idle, retire, other_instr, stall;
  logic [2:0] fwd_ex, fwd_wb;
  int checks = 0, failures = 0, n_retire = 0;
  longint cyc = 0;

  mask_ise_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    rnd <= {$urandom, $urandom};
    cyc <= cyc + 1;
    n_retire += int'(retire);
  end

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

  function automatic logic [31:0] enc(input logic [2:0] f3, input int d, input int a, input int b);
    return {7'h7c, 5'(2 * b), 5'(2 * a), f3, 5'(2 * d), 7'h5b};
  endfunction

  task automatic wait_idle();
    @(posedge clk);
    while (!idle) @(posedge clk);
  endtask

  // "load" a masked word into pair p, in order after all earlier instructions
  task automatic st(input int p, input mword_t m);
    wait_idle();
    @(negedge clk);
    ext_we = 1; ext_waddr = 5'(2 * p); ext_wdata = m;
    @(negedge clk);
    ext_we = 0;
  endtask

  task automatic ld(input int p, output mword_t m);  // read pair p after the pipe drained
    @(posedge clk);
    while (!idle) @(posedge clk);
    @(negedge clk);
    ext_raddr = 5'(2 * p); #1;
    m = ext_rdata;
  endtask

  task automatic issue(input logic [31:0] w);
    instr_valid = 1; instr = w;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    #1;
    instr_valid = 0;
  endtask

  function automatic logic [31:0] um(input mword_t m);
    return m.s0 ^ bitrev(m.s1);
  endfunction

  initial begin
    int idx [W];
    mword_t idx_m [W];
    logic [N-1:0] coef_exp;
    mword_t m;
    longint t0;
    int r0;

    instr_valid = 0; instr = '0; ext_we = 0; ext_waddr = '0; ext_wdata = '0; ext_raddr = '0;
    rnd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------- index-to-coefficient conversion ----------
    coef_exp = '0;
    for (int j = 0; j < W; j++) begin
      logic dup;
      do begin
        idx[j] = $urandom_range(0, N - 1);
        dup = 0;
        for (int k = 0; k < j; k++) if (idx[k] == idx[j]) dup = 1;
      end while (dup);
      coef_exp[idx[j]] = 1'b1;
      idx_m[j] = rshare(32'(idx[j]));        // masked indices in "memory"
    end
    st(7, rshare(32'd1));                        // pair 7: constant one
    t0 = cyc; r0 = n_retire;
    for (int i = 0; i < N; i++) begin
      st(8, rshare(32'(i)));                     // pair 8: public counter i
      st(10, rshare(32'd0));                     // pair 10: coefficient
      for (int j = 0; j < W; j++) begin
        st(1 + (j % 2), idx_m[j]);               // load index j
        issue(enc(3'd1, 9, 1 + (j % 2), 8));     // c  = (idx_j == i)
        issue(enc(3'd0, 10, 7, 9));              // cf = c ? 1 : cf
      end
      ld(10, m);
      checks++;
      if (um(m) !== {31'b0, coef_exp[i]}) begin
        failures++; $display("FAIL i2c coef %0d got=%h exp=%0d", i, um(m), coef_exp[i]);
      end
    end
    checks++;
    if (n_retire - r0 != 2 * N * W) begin
      failures++; $display("FAIL i2c executed %0d instructions, expected %0d", n_retire - r0, 2 * N * W);
    end
    $display("i2c N=%0d W=%0d: %0d masked instructions, %0d cycles", N, W, n_retire - r0, cyc - t0);

    // ---------- word-unit rotation ----------
    for (int rep = 0; rep < 3; rep++) begin
      logic [31:0] s [SW];
      mword_t v [3*SW];
      int delta, top, ncmov;
      delta = (rep == 0) ? SW - 1 : (rep == 1) ? 1 : $urandom_range(0, SW - 1);
      for (int k = 0; k < SW; k++) s[k] = $urandom;
      for (int k = 0; k < 3 * SW; k++) v[k] = rshare(s[k % SW]);
      top = 1;
      while (top * 2 < SW) top *= 2;             // highest offset bit
      t0 = cyc; r0 = n_retire; ncmov = 0;
      for (int i = top; i >= 1; i = i >> 1) begin
        // masked condition bit for this level: bit of the secret offset
        st(3, rshare(32'((delta & i) != 0)));
        for (int j = 0; j < SW + i; j++) begin
          st(1, v[j]);
          st(2, v[j + i]);
          issue(enc(3'd0, 1, 2, 3));             // v[j] = bit ? v[j+i] : v[j]
          ncmov++;
          ld(1, v[j]);
        end
      end
      for (int k = 0; k < SW; k++) begin
        checks++;
        if (um(v[k]) !== s[(k + delta) % SW]) begin
          failures++; $display("FAIL rot delta=%0d word %0d", delta, k);
        end
      end
      checks++;
      if (n_retire - r0 != ncmov) begin
        failures++; $display("FAIL rotation cmov count %0d, expected %0d", n_retire - r0, ncmov);
      end
      $display("rotation r=%0d (%0d words) delta=%0d: %0d cmov, %0d cycles", RBITS, SW, delta,
               n_retire - r0, cyc - t0);
    end

    // ---------- comparison sampling ----------
    begin
      logic [31:0] thr, rv;
      int ones = 0;
      thr = 32'((longint'(1) << LBITS) * W / N);
      st(5, rshare(thr));
      t0 = cyc; r0 = n_retire;
      for (int i = 0; i < N; i++) begin
        rv = 32'($urandom_range(0, (1 << LBITS) - 1));
        if (i == 0) rv = thr;                    // boundary: equal is not below
        if (i == 1) rv = thr - 1;
        st(6, rshare(rv));
        issue(enc(3'd2, 4, 5, 6));               // coef = thr > r
        ld(4, m);
        checks++;
        if (um(m) !== {31'b0, thr > rv}) begin
          failures++; $display("FAIL cmp sample %0d r=%h", i, rv);
        end
        ones += int'(um(m) == 1);
      end
      $display("comparison sampling N=%0d threshold=%0d: %0d ones, %0d cmpgt", N, thr, ones, n_retire - r0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
