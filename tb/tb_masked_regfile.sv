// Self-checking test of the share-pair register file against a reference
// array: random pair writes on both ports (write-back priority on a clash),
// three random pair reads plus the extra read port, x0 reading as zero and
// read-before-write in the writing cycle.
module tb_masked_regfile;
  import mask_pkg::*;
  logic clk = 0;
  logic [4:0] ra1, ra2, ra3, wb_wa, ext_wa, ext_raddr;
  mword_t rd1, rd2, rd3, wb_wd, ext_wd, ext_rdata;
  logic wb_we, ext_we;
  logic [31:0] ref_r [32];
  int checks = 0, failures = 0;

  masked_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mword_t refpair(input logic [4:0] a);
    logic [4:0] e = {a[4:1], 1'b0};
    return '{s0: (e == 0) ? 32'h0 : ref_r[e], s1: ref_r[{a[4:1], 1'b1}]};
  endfunction

  task automatic chk(input string nm, input mword_t got, input mword_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h/%h exp=%h/%h", nm, got.s0, got.s1, exp.s0, exp.s1);
    end
  endtask

  initial begin
    wb_we = 0; ext_we = 0; wb_wa = 0; ext_wa = 0; wb_wd = '0; ext_wd = '0;
    ra1 = 0; ra2 = 0; ra3 = 0; ext_raddr = 0;
    // initialise every pair through the ext port
    for (int p = 0; p < 16; p++) begin
      @(negedge clk);
      ext_we = 1; ext_wa = 5'(2 * p + (p % 2)); ext_wd = '{s0: $urandom, s1: $urandom};
      ref_r[2*p] = ext_wd.s0; ref_r[2*p+1] = ext_wd.s1;
    end
    @(negedge clk); ext_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = 5'($urandom); ext_raddr = 5'($urandom);
      wb_we = 1'($urandom); ext_we = 1'($urandom);
      wb_wa = 5'($urandom); ext_wa = (t % 7 == 0) ? wb_wa : 5'($urandom);
      wb_wd = '{s0: $urandom, s1: $urandom}; ext_wd = '{s0: $urandom, s1: $urandom};
      #1;
      chk("rd1", rd1, refpair(ra1));
      chk("rd2", rd2, refpair(ra2));
      chk("rd3", rd3, refpair(ra3));
      chk("ext", ext_rdata, refpair(ext_raddr));
      if (ext_we && !(wb_we && wb_wa[4:1] == ext_wa[4:1])) begin
        ref_r[{ext_wa[4:1], 1'b0}] = ext_wd.s0; ref_r[{ext_wa[4:1], 1'b1}] = ext_wd.s1;
      end
      if (wb_we) begin
        ref_r[{wb_wa[4:1], 1'b0}] = wb_wd.s0; ref_r[{wb_wa[4:1], 1'b1}] = wb_wd.s1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
