// forward_unit: operand forwarding for ALU-1 (standard instructions).
//
// An instruction in EX1 may read a register that an older instruction still in MA or WB
// will write through port 1. The unit compares the EX1 source register numbers with those
// destinations and selects, per operand, the MA-stage ALU result (FWD_MA), the WB-stage
// write-back value (FWD_WB) or the register-file value (FWD_NONE); the younger MA stage
// wins over WB. A load in MA is not forwarded from MA: its data exists only in WB, and the
// hazard unit stalls the dependent instruction one cycle so that it reaches WB first.
// Image-instruction iterations are never forwarded to (en = 0): they pass pixel words
// through the register file on purpose (see the core). Combinational.
module forward_unit
  import cmips_pkg::*;
(
  input  logic       en,            // EX1 holds a valid standard instruction
  input  logic [4:0] ex1_rs,
  input  logic       ex1_rs_used,
  input  logic [4:0] ex1_rt,
  input  logic       ex1_rt_used,
  input  logic       ma_valid,
  input  logic       ma_reg_write,
  input  logic       ma_mem_to_reg,
  input  logic [4:0] ma_wreg,
  input  logic       wb_valid,
  input  logic       wb_reg_write,
  input  logic [4:0] wb_wreg,
  output fwd_e       fwd_a,
  output fwd_e       fwd_b
);
  function automatic fwd_e sel(input logic used, input logic [4:0] r);
    if (!en || !used)                                                   return FWD_NONE;
    if (ma_valid && ma_reg_write && !ma_mem_to_reg && ma_wreg == r)     return FWD_MA;
    if (wb_valid && wb_reg_write && wb_wreg == r)                       return FWD_WB;
    return FWD_NONE;
  endfunction

  assign fwd_a = sel(ex1_rs_used, ex1_rs);
  assign fwd_b = sel(ex1_rt_used, ex1_rt);
endmodule
