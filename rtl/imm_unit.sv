// imm_unit: immediate extension and target calculation of the ID stage.
//
// Extends the 16-bit immediate Inst[15:0] by sign (arithmetic, load/store, branches) or by
// zeros (andi, ori, xori), and forms the two jump targets: the branch target
// PC+4 + (sign-extended immediate << 2) and the J-type target
// {PC+4[31:28], Inst[25:0], 2'b00}. These are the sign-extend and shift-left-2 blocks of
// the MIPS_32 datapath. Purely combinational.
module imm_unit (
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  input  logic        zero_ext,
  output logic [31:0] imm,
  output logic [31:0] br_target,
  output logic [31:0] j_target
);
  logic [31:0] pc4, sext;

  always_comb begin
    pc4       = pc + 32'd4;
    sext      = {{16{instr[15]}}, instr[15:0]};
    imm       = zero_ext ? {16'b0, instr[15:0]} : sext;
    br_target = pc4 + (sext << 2);
    j_target  = {pc4[31:28], instr[25:0], 2'b00};
  end
endmodule
