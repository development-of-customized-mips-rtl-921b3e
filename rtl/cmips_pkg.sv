// cmips_pkg: types and constants shared by the CMIPS_32 core.
//
// The core runs two instruction families in one 32-bit instruction word:
//   * standard instructions (SI): the MIPS_32 R-, I- and J-type formats, opcode in Inst[31:26];
//   * image-processing instructions (IPI): Inst[31:26] = 6'b111111 marks the word as an IPI,
//     Inst[25:20] is the IPI opcode and four 5-bit register fields follow:
//     rs = Inst[19:15] (source image address, later its pixels), rt = Inst[14:10]
//     (second image address or a scalar), rd = Inst[9:5] (result image address) and
//     rz = Inst[4:0] (image size in pixels).
// These field positions follow the register-file port wiring of the design. The numeric IPI
// opcodes (0..9, in the order of the instruction table) and the ALU operation codes below are
// this implementation's own encoding; only their 5-bit width is given by the design.
// Pixels are 8-bit unsigned and four of them are packed in a 32-bit word, little-endian
// (the pixel at the lowest byte address is in bits [7:0]).
package cmips_pkg;

  // ---------------------------------------------------------------- SI opcodes (Inst[31:26])
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_SLTI  = 6'h0A,
    OP_SLTIU = 6'h0B,
    OP_ANDI  = 6'h0C,
    OP_ORI   = 6'h0D,
    OP_XORI  = 6'h0E,
    OP_LUI   = 6'h0F,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B,
    OP_IPI   = 6'h3F   // instruction-type field all ones: image-processing instruction
  } opcode_e;

  // R-type function codes (Inst[5:0]). FN_MTSR is this core's own: SR <= R[rs].
  typedef enum logic [5:0] {
    FN_SLL  = 6'h00,
    FN_SRL  = 6'h02,
    FN_SRA  = 6'h03,
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A,
    FN_SLTU = 6'h2B,
    FN_MTSR = 6'h3F
  } funct_e;

  // ---------------------------------------------------------------- IPI opcodes (Inst[25:20])
  typedef enum logic [5:0] {
    IP_INCBRI = 6'd0,  // [rd] = sat([rs] + R(rt))
    IP_DECBRI = 6'd1,  // [rd] = sat([rs] - R(rt))
    IP_ANDIM  = 6'd2,  // [rd] = [rs] & [rt]
    IP_ADDIM  = 6'd3,  // [rd] = sat([rs] + [rt])
    IP_SUBIM  = 6'd4,  // [rd] = sat([rs] - [rt])
    IP_THIM1  = 6'd5,  // [rd] = [rs] >= R(rt) ? 255 : 0
    IP_NAGIM  = 6'd6,  // [rd] = 255 - [rs]
    IP_THIM2  = 6'd7,  // [rd] = [rs] >= R(rt) ? [rs] : 0
    IP_GAMIM  = 6'd8,  // EX1: sat([rs]*[rt]), EX2: sat(EX1 * R(SR))
    IP_EDGIM  = 6'd9   // EX1: |[rs]-[rt]|,    EX2: EX1 >= R(SR) ? [rs] : 0
  } ipi_op_e;

  // ---------------------------------------------------------------- ALU-1 operations (5 bit)
  typedef enum logic [4:0] {
    A1_ADD   = 5'd0,
    A1_SUB   = 5'd1,
    A1_AND   = 5'd2,
    A1_OR    = 5'd3,
    A1_XOR   = 5'd4,
    A1_NOR   = 5'd5,
    A1_SLT   = 5'd6,
    A1_SLTU  = 5'd7,
    A1_SLL   = 5'd8,
    A1_SRL   = 5'd9,
    A1_SRA   = 5'd10,
    A1_LUI   = 5'd11,
    A1_PASSA = 5'd12,
    // per-pixel operations on four packed 8-bit pixels
    A1_PADDS = 5'd16,  // saturating add
    A1_PSUBS = 5'd17,  // saturating subtract (floor 0)
    A1_PBIN  = 5'd18,  // a >= b ? 255 : 0
    A1_PNEG  = 5'd19,  // 255 - a
    A1_PTHR  = 5'd20,  // a >= b ? a : 0
    A1_PMULS = 5'd21,  // saturating multiply
    A1_PABSD = 5'd22   // absolute difference
  } alu1_op_e;

  // ---------------------------------------------------------------- ALU-2 operations (5 bit)
  typedef enum logic [4:0] {
    A2_PASS  = 5'd0,   // EX2 not used
    A2_MULSR = 5'd1,   // per pixel sat(o1 * SR)
    A2_EDGE  = 5'd2    // per pixel o1 >= SR ? a : 0
  } alu2_op_e;

  // ---------------------------------------------------------------- control word (Table of CU outputs)
  typedef struct packed {
    logic     br;           // conditional branch
    logic     bne;          // branch on not-equal (else on equal)
    logic     jump;         // J-type jump (resolved in ID)
    logic     im;           // IPI indicator
    logic     mr;           // read block memory
    logic     mw;           // write block memory
    logic     kr;           // read kernel memory
    logic     lo;           // ACU/LPDU: not the first iteration
    logic     st;           // ACU: advance the write address
    logic     reg_write1;   // RF write port 1
    logic     reg_write2;   // RF write port 2
    alu1_op_e alu1_op;
    alu2_op_e alu2_op;
    logic     reg_dst;      // SI destination: 1 = Inst[15:11], 0 = Inst[20:16]
    logic     mem_to_reg;   // write port 1 takes block-memory data
    logic     alu_exe_st2;  // instruction uses the EX2 stage
    logic     alu_src;      // ALU-1 operand B from the immediate
    logic     imm_zero;     // zero-extend the immediate (andi/ori/xori)
    logic     pix_scalar;   // IPI operand B is R(rt)[7:0] copied to all four pixels
    logic     sr_write;     // write ALU-1 result to SR
  } ctrl_t;

  // ---------------------------------------------------------------- pipeline-register contents
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    ctrl_t       ctrl;
    logic [4:0]  rs_idx;     // source register numbers (for forwarding)
    logic [4:0]  rt_idx;
    logic        rs_used;
    logic        rt_used;
    logic [4:0]  wreg1;      // destination of write port 1
    logic [4:0]  wreg2;      // destination of write port 2
    logic [4:0]  shamt;
    logic [31:0] imm;        // extended immediate
    logic [31:0] br_target;  // PC+4 + (sext(imm) << 2)
    logic [31:0] a;          // Read_data_1 (rs)
    logic [31:0] b;          // Read_data_2 (rt)
    logic [31:0] c;          // Read_data_3 (rd)
    logic [31:0] sz;         // Read_data_4 (rz)
    logic [31:0] sr;         // Read_data_SR
    logic [31:0] result;     // ALU-1 / ALU-2 result
    logic [31:0] store_data; // SI store data
    logic [31:0] bmar;       // block-memory read address
    logic [31:0] bmaw;       // block-memory write address
    logic [31:0] kmar;       // kernel-memory read address
    logic [31:0] bdata;      // block-memory read data
    logic [31:0] kdata;      // kernel-memory read data
  } stage_t;

  // Forwarding selections for an ALU-1 operand.
  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,
    FWD_MA   = 2'd1,
    FWD_WB   = 2'd2
  } fwd_e;

  // Event strobes brought out of the top for observation.
  typedef struct packed {
    logic load_use_stall;   // ID held one cycle behind a load
    logic ipi_entry_stall;  // IPI waits for older instructions to leave EX1/EX2/MA
    logic ipi_drain_stall;  // instruction after an IPI waits for its iterations
    logic branch_flush;     // taken branch in EX1
    logic jump;             // jump taken in ID
    logic fwd_ma;           // ALU-1 operand forwarded from MA
    logic fwd_wb;           // ALU-1 operand forwarded from WB
    logic ipi_issue;        // one IPI iteration issued from ID
    logic ipi_busy;         // ID occupied by a running IPI (issue or drain)
    logic ex2_used;         // EX2 stage holds an instruction
    logic ex2_skipped;      // an IPI iteration went EX1 -> MA directly
    logic last_pixel;       // LPDU raised Reset&Update
    logic mem_rw_same_cycle;// block memory read and written in one cycle
  } events_t;

endpackage
