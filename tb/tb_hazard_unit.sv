// tb_hazard_unit: self-checking test of the stall and flush rules, with random stage
// contents against the rules restated independently below, plus directed cases for each
// hazard (load-use, image-instruction entry and drain, branch, jump).
module tb_hazard_unit;
  logic id_valid, id_is_ipi, id_started, rs_used, rt_used, id_jump;
  logic ex1_valid, ex1_ipi, ex1_m2r, ex1_rw, br_taken, ex2_valid, ma_valid, ma_ipi;
  logic [4:0] rs, rt, ex1_w;
  logic stall, flush_ifid, flush_idex, load_use, ipi_entry, ipi_drain;
  int checks = 0, failures = 0;
  int seen_lu = 0, seen_entry = 0, seen_drain = 0;

  hazard_unit dut (.id_valid, .id_is_ipi, .id_ipi_started(id_started), .id_rs(rs), .id_rs_used(rs_used),
                   .id_rt(rt), .id_rt_used(rt_used), .id_jump, .ex1_valid, .ex1_is_ipi(ex1_ipi),
                   .ex1_mem_to_reg(ex1_m2r), .ex1_reg_write(ex1_rw), .ex1_wreg(ex1_w),
                   .ex1_branch_taken(br_taken), .ex2_valid, .ma_valid, .ma_is_ipi(ma_ipi),
                   .stall, .flush_ifid, .flush_idex, .load_use, .ipi_entry, .ipi_drain);

  task automatic check;
    logic e_lu, e_en, e_dr, e_st;
    #1;
    e_lu = 0; e_en = 0; e_dr = 0;
    if (id_valid && !id_is_ipi && ex1_valid && !ex1_ipi && ex1_m2r && ex1_rw)
      if ((rs_used && rs == ex1_w) || (rt_used && rt == ex1_w)) e_lu = 1;
    if (id_valid && id_is_ipi && !id_started)
      if (ex1_valid || ex2_valid || ma_valid) e_en = 1;
    if (id_valid && !id_is_ipi)
      if ((ex1_valid && ex1_ipi) || ex2_valid || (ma_valid && ma_ipi)) e_dr = 1;
    e_st = (e_lu || e_en || e_dr) && !br_taken;
    checks += 6;
    if (load_use !== e_lu)  begin failures++; $display("FAIL load_use"); end
    if (ipi_entry !== e_en) begin failures++; $display("FAIL ipi_entry"); end
    if (ipi_drain !== e_dr) begin failures++; $display("FAIL ipi_drain"); end
    if (stall !== e_st)     begin failures++; $display("FAIL stall"); end
    if (flush_idex !== br_taken) begin failures++; $display("FAIL flush_idex"); end
    if (flush_ifid !== (br_taken || (id_valid && id_jump && !e_st))) begin failures++; $display("FAIL flush_ifid"); end
    seen_lu += e_lu; seen_entry += e_en; seen_drain += e_dr;
  endtask

  task automatic clear;
    {id_valid, id_is_ipi, id_started, rs_used, rt_used, id_jump} = '0;
    {ex1_valid, ex1_ipi, ex1_m2r, ex1_rw, br_taken, ex2_valid, ma_valid, ma_ipi} = '0;
    rs = 0; rt = 0; ex1_w = 0;
  endtask

  initial begin
    // directed: lw r3 in EX1, add using r3 in ID -> stall
    clear(); id_valid = 1; rs_used = 1; rs = 3; ex1_valid = 1; ex1_m2r = 1; ex1_rw = 1; ex1_w = 3;
    check(); checks++; if (!stall || !load_use) failures++;
    // directed: IPI waiting for an older instruction in MA
    clear(); id_valid = 1; id_is_ipi = 1; ma_valid = 1;
    check(); checks++; if (!stall || !ipi_entry) failures++;
    // directed: SI behind an IPI iteration in EX2
    clear(); id_valid = 1; ex2_valid = 1;
    check(); checks++; if (!stall || !ipi_drain) failures++;
    // directed: taken branch wins over everything and flushes both registers
    clear(); id_valid = 1; id_is_ipi = 1; ma_valid = 1; br_taken = 1;
    check(); checks++; if (stall || !flush_ifid || !flush_idex) failures++;
    // directed: jump flushes IF/ID
    clear(); id_valid = 1; id_jump = 1;
    check(); checks++; if (!flush_ifid || flush_idex) failures++;
    for (int n = 0; n < 5000; n++) begin
      {id_valid, id_is_ipi, id_started, rs_used, rt_used, id_jump} = 6'($urandom);
      {ex1_valid, ex1_ipi, ex1_m2r, ex1_rw, ex2_valid, ma_valid, ma_ipi} = 7'($urandom);
      br_taken = $urandom_range(0, 7) == 0;
      rs = 5'($urandom_range(0, 3)); rt = 5'($urandom_range(0, 3)); ex1_w = 5'($urandom_range(0, 3));
      check();
    end
    checks++;
    if (seen_lu == 0 || seen_entry == 0 || seen_drain == 0) failures++;
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
