// control_unit: instruction decoder and image-instruction sequencer (ID stage).
//
// Decode. A word whose type field Inst[31:26] is all ones is an image-processing
// instruction (IPI) with its opcode in Inst[25:20]; any other word is a standard MIPS_32
// instruction (SI) decoded from Inst[31:26] and, for R-type, Inst[5:0]. The unit emits the
// control word of the design: Br, Im, Mr, Mw, Kr, Lo, St, RegWrite_1/2, ALU1-OP, ALU2-OP,
// RegDst, MemtoReg, ALU_EXE_St2 and ALUSrc, plus a few fields this implementation needs
// (bne, jump, zero-extension, scalar operand, SR write). Undefined opcodes decode as a
// no-operation.
//
// Sequencing. An IPI stays in ID and is issued once per cycle, one iteration per 32-bit
// word (four pixels), while the PC and IF/ID hold. Each iteration reads a block (and, for
// two-image operations, a kernel) word in MA and writes it back to registers rs (and rt)
// in WB; ID reads those registers again, so the pixels read by iteration j are processed
// by iteration j+LAT, where LAT = 3 for a five-stage IPI and 4 for a six-stage one (the
// write-back-to-decode distance). Hence, for iteration j:
//   Lo = (j > 0)        ACU/LPDU use their registers instead of the start addresses
//   Mw = (j >= LAT)     a processed word exists and is written
//   St = (j >  LAT)     the write address advances from the second write on
//   Mr = 1 until the LPDU has reported the last pixel (Reset&Update).
// Reset&Update arrives from EX1 for the first iteration whose read address is past the
// image, while ID issues the next one; the unit then issues LAT-2 more iterations so that
// every word read is also written, and the last of them releases IF/ID and resets the
// sequencer for the next instruction. Iterations of an IPI never stall once started.
module control_unit
  import cmips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] instr,
  input  logic        id_valid,
  input  logic        issue,         // the ID instruction/iteration moves to EX1 this cycle
  input  logic        reset_update,  // LPDU: last pixel passed
  output ctrl_t       ctrl,
  output logic        is_ipi,
  output logic        ipi_started,   // first iteration already issued
  output logic        ipi_last,      // this issue is the last iteration
  output logic        rs_used,
  output logic        rt_used
);
  opcode_e  opc;
  funct_e   fn;
  ipi_op_e  iop;

  // per-IPI static decode
  logic     ipi_known, two_image, scalar, ex2;
  alu1_op_e ipi_a1;
  alu2_op_e ipi_a2;

  // sequencer state
  logic [2:0] cnt_q;     // iteration number, saturating at 7
  logic       ended_q;   // Reset&Update seen
  logic [2:0] left_q;    // iterations still to issue after Reset&Update
  logic [2:0] lat;

  assign opc = opcode_e'(instr[31:26]);
  assign fn  = funct_e'(instr[5:0]);
  assign iop = ipi_op_e'(instr[25:20]);

  always_comb begin
    ipi_known = 1'b1;
    two_image = 1'b0;
    scalar    = 1'b0;
    ex2       = 1'b0;
    ipi_a1    = A1_ADD;
    ipi_a2    = A2_PASS;
    unique case (iop)
      IP_INCBRI: begin ipi_a1 = A1_PADDS; scalar = 1'b1; end
      IP_DECBRI: begin ipi_a1 = A1_PSUBS; scalar = 1'b1; end
      IP_ANDIM:  begin ipi_a1 = A1_AND;   two_image = 1'b1; end
      IP_ADDIM:  begin ipi_a1 = A1_PADDS; two_image = 1'b1; end
      IP_SUBIM:  begin ipi_a1 = A1_PSUBS; two_image = 1'b1; end
      IP_THIM1:  begin ipi_a1 = A1_PBIN;  scalar = 1'b1; end
      IP_NAGIM:  begin ipi_a1 = A1_PNEG; end
      IP_THIM2:  begin ipi_a1 = A1_PTHR;  scalar = 1'b1; end
      IP_GAMIM:  begin ipi_a1 = A1_PMULS; ipi_a2 = A2_MULSR; two_image = 1'b1; ex2 = 1'b1; end
      IP_EDGIM:  begin ipi_a1 = A1_PABSD; ipi_a2 = A2_EDGE;  two_image = 1'b1; ex2 = 1'b1; end
      default:   ipi_known = 1'b0;
    endcase
  end

  assign is_ipi      = id_valid && opc == OP_IPI && ipi_known;
  assign lat         = ex2 ? 3'd4 : 3'd3;
  assign ipi_started = cnt_q != 3'd0;

  // ---------------------------------------------------------------- control word
  always_comb begin
    logic mr_iter;
    ctrl    = '0;
    rs_used = 1'b0;
    rt_used = 1'b0;
    mr_iter = !(ended_q || reset_update);
    if (is_ipi) begin
      ctrl.im          = 1'b1;
      ctrl.alu1_op     = ipi_a1;
      ctrl.alu2_op     = ipi_a2;
      ctrl.alu_exe_st2 = ex2;
      ctrl.pix_scalar  = scalar;
      ctrl.kr          = two_image;
      ctrl.mr          = mr_iter;
      ctrl.lo          = cnt_q != 3'd0;
      ctrl.mw          = cnt_q >= lat;
      ctrl.st          = cnt_q >  lat;
      ctrl.reg_write1  = mr_iter;
      ctrl.reg_write2  = mr_iter && two_image;
      ctrl.mem_to_reg  = 1'b1;
    end else if (id_valid) begin
      unique case (opc)
        OP_RTYPE: begin
          ctrl.reg_dst    = 1'b1;
          ctrl.reg_write1 = 1'b1;
          rs_used         = 1'b1;
          rt_used         = 1'b1;
          unique case (fn)
            FN_SLL:  begin ctrl.alu1_op = A1_SLL; rs_used = 1'b0; end
            FN_SRL:  begin ctrl.alu1_op = A1_SRL; rs_used = 1'b0; end
            FN_SRA:  begin ctrl.alu1_op = A1_SRA; rs_used = 1'b0; end
            FN_ADD, FN_ADDU: ctrl.alu1_op = A1_ADD;
            FN_SUB, FN_SUBU: ctrl.alu1_op = A1_SUB;
            FN_AND:  ctrl.alu1_op = A1_AND;
            FN_OR:   ctrl.alu1_op = A1_OR;
            FN_XOR:  ctrl.alu1_op = A1_XOR;
            FN_NOR:  ctrl.alu1_op = A1_NOR;
            FN_SLT:  ctrl.alu1_op = A1_SLT;
            FN_SLTU: ctrl.alu1_op = A1_SLTU;
            FN_MTSR: begin
              ctrl.alu1_op    = A1_PASSA;
              ctrl.reg_write1 = 1'b0;
              ctrl.sr_write   = 1'b1;
              rt_used         = 1'b0;
            end
            default: begin ctrl.reg_write1 = 1'b0; rs_used = 1'b0; rt_used = 1'b0; end
          endcase
        end
        OP_ADDI, OP_ADDIU: begin ctrl.alu1_op = A1_ADD;  ctrl.alu_src = 1'b1; ctrl.reg_write1 = 1'b1; rs_used = 1'b1; end
        OP_SLTI:  begin ctrl.alu1_op = A1_SLT;  ctrl.alu_src = 1'b1; ctrl.reg_write1 = 1'b1; rs_used = 1'b1; end
        OP_SLTIU: begin ctrl.alu1_op = A1_SLTU; ctrl.alu_src = 1'b1; ctrl.reg_write1 = 1'b1; rs_used = 1'b1; end
        OP_ANDI:  begin ctrl.alu1_op = A1_AND;  ctrl.alu_src = 1'b1; ctrl.imm_zero = 1'b1; ctrl.reg_write1 = 1'b1; rs_used = 1'b1; end
        OP_ORI:   begin ctrl.alu1_op = A1_OR;   ctrl.alu_src = 1'b1; ctrl.imm_zero = 1'b1; ctrl.reg_write1 = 1'b1; rs_used = 1'b1; end
        OP_XORI:  begin ctrl.alu1_op = A1_XOR;  ctrl.alu_src = 1'b1; ctrl.imm_zero = 1'b1; ctrl.reg_write1 = 1'b1; rs_used = 1'b1; end
        OP_LUI:   begin ctrl.alu1_op = A1_LUI;  ctrl.alu_src = 1'b1; ctrl.reg_write1 = 1'b1; end
        OP_LW:    begin ctrl.alu1_op = A1_ADD;  ctrl.alu_src = 1'b1; ctrl.reg_write1 = 1'b1;
                        ctrl.mr = 1'b1; ctrl.mem_to_reg = 1'b1; rs_used = 1'b1; end
        OP_SW:    begin ctrl.alu1_op = A1_ADD;  ctrl.alu_src = 1'b1; ctrl.mw = 1'b1;
                        rs_used = 1'b1; rt_used = 1'b1; end
        OP_BEQ:   begin ctrl.alu1_op = A1_SUB;  ctrl.br = 1'b1; rs_used = 1'b1; rt_used = 1'b1; end
        OP_BNE:   begin ctrl.alu1_op = A1_SUB;  ctrl.br = 1'b1; ctrl.bne = 1'b1; rs_used = 1'b1; rt_used = 1'b1; end
        OP_J:     ctrl.jump = 1'b1;
        default:  ;
      endcase
    end
  end

  assign ipi_last = is_ipi && issue && ended_q && left_q == 3'd1;

  // ---------------------------------------------------------------- iteration sequencer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      ended_q <= 1'b0;
      left_q  <= '0;
    end else if (is_ipi && issue) begin
      if (ipi_last) begin
        cnt_q   <= '0;       // Reset&Update: ready for the next instruction
        ended_q <= 1'b0;
        left_q  <= '0;
      end else begin
        if (cnt_q != 3'd7) cnt_q <= cnt_q + 3'd1;
        if (ended_q)           left_q <= left_q - 3'd1;
        else if (reset_update) begin
          ended_q <= 1'b1;
          left_q  <= lat - 3'd2;
        end
      end
    end
  end
endmodule
