// tb_forward_unit: self-checking test of operand forwarding. Random stage contents are
// compared with a reference priority rule written out below: MA (not a load) before WB,
// only for used operands of a standard instruction in EX1.
module tb_forward_unit;
  import cmips_pkg::*;
  logic       en, rs_used, rt_used, ma_valid, ma_rw, ma_m2r, wb_valid, wb_rw;
  logic [4:0] rs, rt, ma_w, wb_w;
  fwd_e       fa, fb;
  int checks = 0, failures = 0, n_ma = 0, n_wb = 0;

  forward_unit dut (.en, .ex1_rs(rs), .ex1_rs_used(rs_used), .ex1_rt(rt), .ex1_rt_used(rt_used),
                    .ma_valid, .ma_reg_write(ma_rw), .ma_mem_to_reg(ma_m2r), .ma_wreg(ma_w),
                    .wb_valid, .wb_reg_write(wb_rw), .wb_wreg(wb_w), .fwd_a(fa), .fwd_b(fb));

  function automatic fwd_e expect_sel(input logic used, input logic [4:0] r);
    fwd_e s;
    s = FWD_NONE;
    if (en && used) begin
      if (wb_valid && wb_rw && wb_w == r) s = FWD_WB;
      if (ma_valid && ma_rw && !ma_m2r && ma_w == r) s = FWD_MA;
    end
    return s;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      en = $urandom_range(0, 3) != 0; rs_used = $urandom_range(0, 3) != 0; rt_used = $urandom_range(0, 1);
      ma_valid = $urandom_range(0, 3) != 0; ma_rw = $urandom_range(0, 3) != 0; ma_m2r = $urandom_range(0, 3) == 0;
      wb_valid = $urandom_range(0, 3) != 0; wb_rw = $urandom_range(0, 3) != 0;
      rs = 5'($urandom_range(0, 3)); rt = 5'($urandom_range(0, 3));
      ma_w = 5'($urandom_range(0, 3)); wb_w = 5'($urandom_range(0, 3));
      #1;
      checks += 2;
      if (fa !== expect_sel(rs_used, rs)) begin failures++; $display("FAIL a"); end
      if (fb !== expect_sel(rt_used, rt)) begin failures++; $display("FAIL b"); end
      if (fa == FWD_MA) n_ma++;
      if (fa == FWD_WB) n_wb++;
    end
    checks++;
    if (n_ma == 0 || n_wb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
