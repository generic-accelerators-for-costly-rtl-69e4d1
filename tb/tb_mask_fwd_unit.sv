// Self-checking test of the forwarding/hazard unit against an independent
// reference: random source/destination addresses (biased to collide),
// checks operand selection priority EX > WB > register file, the per-source
// forward flags, the hazard flag and that pair 0 is never forwarded.
module tb_mask_fwd_unit;
  import mask_pkg::*;
  logic [4:0] src_addr [3];
  logic [2:0] src_used, fwd_ex, fwd_wb;
  mword_t rf_data [3], opnd [3];
  logic ex_valid, ex_done, wb_valid, hazard;
  logic [4:0] ex_rd, wb_rd;
  mword_t ex_res, wb_res;
  int checks = 0, failures = 0;
  int n_ex = 0, n_wb = 0, n_hz = 0;

  mask_fwd_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_hz;
    mword_t exp;
    logic mex, mwb;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 3; i++) begin
        src_addr[i] = 5'($urandom_range(0, 7));
        rf_data[i]  = '{s0: $urandom, s1: $urandom};
      end
      src_used = 3'($urandom);
      ex_valid = 1'($urandom); ex_done = 1'($urandom); wb_valid = 1'($urandom);
      ex_rd = 5'($urandom_range(0, 7)); wb_rd = 5'($urandom_range(0, 7));
      ex_res = '{s0: $urandom, s1: $urandom}; wb_res = '{s0: $urandom, s1: $urandom};
      #1;
      exp_hz = 0;
      for (int i = 0; i < 3; i++) begin
        mex = src_used[i] && (src_addr[i] >= 2) && ex_valid && (ex_rd / 2 == src_addr[i] / 2);
        mwb = src_used[i] && (src_addr[i] >= 2) && wb_valid && (wb_rd / 2 == src_addr[i] / 2);
        if (mex && !ex_done) exp_hz = 1;
        exp = (mex && ex_done) ? ex_res : (mwb && !mex) ? wb_res : rf_data[i];
        if (mex && ex_done) n_ex++;
        if (mwb && !mex) n_wb++;
        checks++;
        if (opnd[i] !== exp || fwd_ex[i] !== (mex && ex_done) || fwd_wb[i] !== (mwb && !mex)) begin
          failures++;
          $display("FAIL t=%0d src%0d addr=%0d", t, i, src_addr[i]);
        end
      end
      if (exp_hz) n_hz++;
      checks++;
      if (hazard !== exp_hz) begin failures++; $display("FAIL hazard t=%0d", t); end
    end
    checks++;
    if (n_ex == 0 || n_wb == 0 || n_hz == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
