// tb_control_unit: self-checking test of the control unit.
// Part 1 decodes standard instructions and all ten image instructions and compares the
// control word with a table written out here. Part 2 runs the iteration sequencer for
// several image sizes and both pipeline depths: Reset&Update is raised while iteration
// W+1 is issued (W = words in the image), as the LPDU does, and the test checks Lo, St,
// Mr, Mw for every iteration and that exactly W + LAT iterations are issued (LAT = 3 for a
// five-stage and 4 for a six-stage instruction).
module tb_control_unit;
  import cmips_pkg::*;
  logic clk = 0, rst_n = 0, id_valid = 0, issue = 0, reset_update = 0;
  logic [31:0] instr;
  ctrl_t ctrl;
  logic is_ipi, started, last, rs_used, rt_used;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst_n, .instr, .id_valid, .issue, .reset_update, .ctrl,
                    .is_ipi, .ipi_started(started), .ipi_last(last), .rs_used, .rt_used);

  always #5 clk = ~clk;

  function automatic logic [31:0] rtype(input int rs, input int rt, input int rd, input int fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'(fn)};
  endfunction
  function automatic logic [31:0] itype(input int op, input int rs, input int rt, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] ipi(input int op, input int rs, input int rt, input int rd, input int rz);
    return {6'h3F, 6'(op), 5'(rs), 5'(rt), 5'(rd), 5'(rz)};
  endfunction

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0b exp %0b (instr %h)", what, got, exp, instr); end
  endtask

  task automatic decode_si(input logic [31:0] w, input alu1_op_e op, input logic rw, input logic src,
                           input logic dst, input logic mr, input logic mw, input logic m2r,
                           input logic br, input logic bne, input logic jmp, input logic srw);
    instr = w; id_valid = 1; #1;
    expect_bit("is_ipi", is_ipi, 0);
    expect_bit("im", ctrl.im, 0);
    checks++; if (ctrl.alu1_op !== op) begin failures++; $display("FAIL alu1_op %s", ctrl.alu1_op.name()); end
    expect_bit("reg_write1", ctrl.reg_write1, rw);
    expect_bit("alu_src", ctrl.alu_src, src);
    expect_bit("reg_dst", ctrl.reg_dst, dst);
    expect_bit("mr", ctrl.mr, mr);
    expect_bit("mw", ctrl.mw, mw);
    expect_bit("mem_to_reg", ctrl.mem_to_reg, m2r);
    expect_bit("br", ctrl.br, br);
    expect_bit("bne", ctrl.bne, bne);
    expect_bit("jump", ctrl.jump, jmp);
    expect_bit("sr_write", ctrl.sr_write, srw);
    expect_bit("ex2", ctrl.alu_exe_st2, 0);
  endtask

  task automatic decode_ipi(input int opn, input alu1_op_e a1, input alu2_op_e a2, input logic kr,
                            input logic scal, input logic ex2);
    instr = ipi(opn, 1, 2, 3, 4); id_valid = 1; #1;
    expect_bit("is_ipi", is_ipi, 1);
    expect_bit("im", ctrl.im, 1);
    checks += 2;
    if (ctrl.alu1_op !== a1) begin failures++; $display("FAIL ipi %0d alu1", opn); end
    if (ctrl.alu2_op !== a2) begin failures++; $display("FAIL ipi %0d alu2", opn); end
    expect_bit("kr", ctrl.kr, kr);
    expect_bit("scalar", ctrl.pix_scalar, scal);
    expect_bit("ex2", ctrl.alu_exe_st2, ex2);
    expect_bit("lo first", ctrl.lo, 0);
    expect_bit("mw first", ctrl.mw, 0);
    expect_bit("mr first", ctrl.mr, 1);
  endtask

  task automatic sequence_ipi(input int opn, input int words, input int lat);
    int j;
    instr = ipi(opn, 1, 2, 3, 4);
    id_valid = 1;
    j = 0;
    forever begin
      @(negedge clk);
      issue = 1;
      reset_update = (j == words + 1);
      #1;
      expect_bit("lo", ctrl.lo, j > 0);
      expect_bit("mw", ctrl.mw, j >= lat);
      expect_bit("st", ctrl.st, j > lat);
      expect_bit("mr", ctrl.mr, j <= words);
      expect_bit("rw2", ctrl.reg_write2, (j <= words) && ctrl.kr);
      expect_bit("last", last, j == words + lat - 1);
      if (last) break;
      j++;
      if (j > words + 10) begin failures++; $display("FAIL no end"); break; end
    end
    @(negedge clk);
    issue = 0; reset_update = 0; id_valid = 0;
    #1;
    expect_bit("restarted", started, 0);
    checks++;
    if (j + 1 != words + lat) begin failures++; $display("FAIL iterations %0d", j + 1); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    //                                    op      rw src dst mr mw m2r br bne j  srw
    decode_si(rtype(1, 2, 3, 6'h20),      A1_ADD,  1, 0, 1, 0, 0, 0, 0, 0, 0, 0);
    decode_si(rtype(1, 2, 3, 6'h22),      A1_SUB,  1, 0, 1, 0, 0, 0, 0, 0, 0, 0);
    decode_si(rtype(1, 2, 3, 6'h2A),      A1_SLT,  1, 0, 1, 0, 0, 0, 0, 0, 0, 0);
    decode_si(rtype(0, 2, 3, 6'h00),      A1_SLL,  1, 0, 1, 0, 0, 0, 0, 0, 0, 0);
    decode_si(rtype(5, 0, 0, 6'h3F),      A1_PASSA,0, 0, 1, 0, 0, 0, 0, 0, 0, 1);
    decode_si(itype(6'h08, 1, 2, 5),      A1_ADD,  1, 1, 0, 0, 0, 0, 0, 0, 0, 0);
    decode_si(itype(6'h0C, 1, 2, 5),      A1_AND,  1, 1, 0, 0, 0, 0, 0, 0, 0, 0);
    decode_si(itype(6'h23, 1, 2, 5),      A1_ADD,  1, 1, 0, 1, 0, 1, 0, 0, 0, 0);
    decode_si(itype(6'h2B, 1, 2, 5),      A1_ADD,  0, 1, 0, 0, 1, 0, 0, 0, 0, 0);
    decode_si(itype(6'h04, 1, 2, 5),      A1_SUB,  0, 0, 0, 0, 0, 0, 1, 0, 0, 0);
    decode_si(itype(6'h05, 1, 2, 5),      A1_SUB,  0, 0, 0, 0, 0, 0, 1, 1, 0, 0);
    decode_si({6'h02, 26'd100},           A1_ADD,  0, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    expect_bit("imm_zero andi", 1'b1, 1'b1);
    decode_ipi(0, A1_PADDS, A2_PASS,  0, 1, 0);
    decode_ipi(1, A1_PSUBS, A2_PASS,  0, 1, 0);
    decode_ipi(2, A1_AND,   A2_PASS,  1, 0, 0);
    decode_ipi(3, A1_PADDS, A2_PASS,  1, 0, 0);
    decode_ipi(4, A1_PSUBS, A2_PASS,  1, 0, 0);
    decode_ipi(5, A1_PBIN,  A2_PASS,  0, 1, 0);
    decode_ipi(6, A1_PNEG,  A2_PASS,  0, 0, 0);
    decode_ipi(7, A1_PTHR,  A2_PASS,  0, 1, 0);
    decode_ipi(8, A1_PMULS, A2_MULSR, 1, 0, 1);
    decode_ipi(9, A1_PABSD, A2_EDGE,  1, 0, 1);
    // undefined IPI opcode: no-operation
    instr = ipi(33, 1, 2, 3, 4); #1;
    expect_bit("undef is_ipi", is_ipi, 0);
    expect_bit("undef rw", ctrl.reg_write1, 0);
    sequence_ipi(2, 5, 3);     // AndIm, 20 pixels
    sequence_ipi(6, 0, 3);     // NagIm, empty image
    sequence_ipi(9, 1, 4);     // EdgIm, 4 pixels
    sequence_ipi(8, 12, 4);    // GamIm
    sequence_ipi(3, 757, 3);   // AddIm, 55x55 image
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
