// tb_imm_unit: self-checking test of immediate extension and branch/jump targets.
// Random instructions and PCs are driven and the outputs are compared with the MIPS_32
// rules recomputed here: sign or zero extension of Inst[15:0], branch target
// PC + 4 + (sext(imm) << 2), and jump target {PC+4[31:28], Inst[25:0], 2'b00}.
// These are the standard MIPS_32 definitions, which the core keeps unchanged.
module tb_imm_unit;
  logic [31:0] instr, pc, imm, br_target, j_target;
  logic        zero_ext;
  int checks = 0, failures = 0;

  imm_unit dut (.instr, .pc, .zero_ext, .imm, .br_target, .j_target);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int signed off;
      instr = $urandom; pc = $urandom & ~32'h3; zero_ext = $urandom_range(0, 1);
      #1;
      off = int'($signed(instr[15:0]));
      checks += 3;
      if (imm !== (zero_ext ? {16'h0, instr[15:0]} : 32'(off))) begin failures++; $display("FAIL imm"); end
      if (br_target !== pc + 4 + 32'(off * 4)) begin failures++; $display("FAIL br_target"); end
      if (j_target !== (((pc + 4) & 32'hF000_0000) | (instr[25:0] * 4))) begin failures++; $display("FAIL j_target"); end
    end
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
