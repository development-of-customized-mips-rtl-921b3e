// hazard_unit: stall and flush decisions of the CMIPS_32 pipeline.
//
// Stalls hold the PC and the IF/ID register and send a bubble into EX1:
//   * load-use: a standard instruction in ID reads the register a load in EX1 will write;
//     one cycle later the load is in MA and its data is forwarded from WB.
//   * IPI entry: an image instruction in ID has not started and an older instruction is
//     still in EX1, EX2 or MA; the image instruction reads its start addresses, size and SR
//     once, in its first iteration, so they must already be in the register file.
//   * IPI drain: a standard instruction in ID waits while iterations of the preceding image
//     instruction are in EX1, EX2 or MA. This keeps an instruction that skips EX2 from
//     reaching MA in the same cycle as one leaving EX2, and lets it read the registers
//     the iterations write back.
// Flushes: a taken branch in EX1 clears IF/ID and ID/EX1 (two wrong-path instructions);
// a jump in ID (when not stalled) clears IF/ID. Combinational.
module hazard_unit (
  input  logic       id_valid,
  input  logic       id_is_ipi,
  input  logic       id_ipi_started,
  input  logic [4:0] id_rs,
  input  logic       id_rs_used,
  input  logic [4:0] id_rt,
  input  logic       id_rt_used,
  input  logic       id_jump,
  input  logic       ex1_valid,
  input  logic       ex1_is_ipi,
  input  logic       ex1_mem_to_reg,
  input  logic       ex1_reg_write,
  input  logic [4:0] ex1_wreg,
  input  logic       ex1_branch_taken,
  input  logic       ex2_valid,
  input  logic       ma_valid,
  input  logic       ma_is_ipi,
  output logic       stall,
  output logic       flush_ifid,
  output logic       flush_idex,
  output logic       load_use,
  output logic       ipi_entry,
  output logic       ipi_drain
);
  always_comb begin
    load_use  = id_valid && !id_is_ipi && ex1_valid && !ex1_is_ipi && ex1_mem_to_reg &&
                ex1_reg_write &&
                ((id_rs_used && id_rs == ex1_wreg) || (id_rt_used && id_rt == ex1_wreg));
    ipi_entry = id_valid && id_is_ipi && !id_ipi_started && (ex1_valid || ex2_valid || ma_valid);
    ipi_drain = id_valid && !id_is_ipi &&
                ((ex1_valid && ex1_is_ipi) || ex2_valid || (ma_valid && ma_is_ipi));
    stall      = (load_use || ipi_entry || ipi_drain) && !ex1_branch_taken;
    flush_idex = ex1_branch_taken;
    flush_ifid = ex1_branch_taken || (id_valid && id_jump && !stall);
  end
endmodule
