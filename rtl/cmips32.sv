// cmips32: the CMIPS_32 core, a MIPS_32 pipeline extended with image-processing instructions.
//
// Stages: IF, ID, EX1, EX2, MA, WB. Standard instructions (SI) use five of them and skip
// EX2. An image-processing instruction (IPI) is fetched once and then issued from ID once
// per cycle, each issue (iteration) handling one 32-bit word of four 8-bit pixels:
//   ID   reads the pixel words held in registers rs/rt (on the first iteration: the start
//        addresses), rd (result start), rz (size in pixels) and SR;
//   EX1  ALU-1 computes the per-pixel operation; the ACU computes the block read, block
//        write and kernel read addresses; the LPDU compares the read address with the
//        image end and raises Reset&Update;
//   EX2  only for GamIm and EdgIm: ALU-2 applies the second operation with SR;
//   MA   reads the next block (and kernel) word and writes the processed word, in the same
//        cycle, to the block memory;
//   WB   returns the words read to registers rs (block) and rt (kernel), through the two
//        register-file write ports.
// The pixels read by iteration j are processed by iteration j+3 (five-stage IPI) or j+4
// (six-stage IPI); the control unit generates Lo, St, Mr and Mw accordingly and ends the
// instruction after Reset&Update. An IPI over W words keeps ID busy for W+5 cycles
// (five-stage) or W+7 cycles (six-stage); the PC holds meanwhile.
// Standard instructions get the usual MIPS_32 treatment: forwarding from MA and WB, a
// one-cycle load-use stall, branches resolved in EX1 (two-instruction flush) and jumps in
// ID (one-instruction flush). The hazard unit also keeps an IPI from starting while older
// instructions are in EX1..MA, and the next instruction from entering EX1 while IPI
// iterations are there.
// Registers: all 32 are ordinary (no hard-wired zero). SR is written by the R-type
// instruction with function code 6'h3F (SR <= R[rs]).
// Memories: a word-addressed instruction memory with a loader port, a byte-addressed
// block memory and kernel memory (4-byte little-endian, unaligned accesses allowed) with
// host byte ports for loading images and reading results. Loads and stores reach the
// block memory; the kernel memory is read only by IPIs.
// Reset: synchronous, active low; the PC restarts at 0.
module cmips32
  import cmips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned BMEM_BYTES = 16384,
  parameter int unsigned KMEM_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction-memory loader
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  // block-memory host port
  input  logic        bmem_host_we,
  input  logic [31:0] bmem_host_addr,
  input  logic [7:0]  bmem_host_wdata,
  output logic [7:0]  bmem_host_rdata,
  // kernel-memory host port
  input  logic        kmem_host_we,
  input  logic [31:0] kmem_host_addr,
  input  logic [7:0]  kmem_host_wdata,
  output logic [7:0]  kmem_host_rdata,
  // status
  output logic [31:0] pc,
  output events_t     events
);
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } ifid_t;

  // ================================================================ IF
  logic [31:0] pc_q, instr_if;
  ifid_t       ifid_d, ifid_q;

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .pc(pc_q), .instr(instr_if),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // ================================================================ ID
  logic        stall, flush_ifid, flush_idex, load_use, ipi_entry, ipi_drain;
  logic        issue, jump_taken, branch_taken;
  logic        cu_is_ipi, cu_started, cu_last, rs_used, rt_used;
  ctrl_t       id_ctrl;
  logic        id_valid, id_type_ipi;
  logic [4:0]  rr1, rr2, rr3, rr4, wreg1_id;
  logic [31:0] rd1, rd2, rd3, rd4, rdsr, imm_id, brt_id, jt_id;
  stage_t      id_rec, ex1_q, ex1_out, ex2_q, ex2_out, ma_d, ma_q, ma_out, wb_q;
  logic        lpdu_e;
  logic        wb_we1, wb_we2, wb_sr_we;
  logic [31:0] wb_wd1;

  assign id_valid    = ifid_q.valid;
  assign id_type_ipi = ifid_q.instr[31:26] == OP_IPI;

  control_unit u_cu (
    .clk, .rst_n,
    .instr(ifid_q.instr), .id_valid, .issue, .reset_update(lpdu_e),
    .ctrl(id_ctrl), .is_ipi(cu_is_ipi), .ipi_started(cu_started), .ipi_last(cu_last),
    .rs_used, .rt_used
  );

  // Register numbers: Read_reg_1 = Inst[25:21] or Inst[19:15], Read_reg_2 = Inst[20:16]
  // or Inst[14:10], Read_reg_3 = Inst[9:5], Read_reg_4 = Inst[4:0]; Write_reg_1 =
  // Inst[20:16], Inst[15:11] or Inst[19:15]; Write_reg_2 = Inst[14:10].
  always_comb begin
    rr1      = id_type_ipi ? ifid_q.instr[19:15] : ifid_q.instr[25:21];
    rr2      = id_type_ipi ? ifid_q.instr[14:10] : ifid_q.instr[20:16];
    rr3      = ifid_q.instr[9:5];
    rr4      = ifid_q.instr[4:0];
    wreg1_id = id_type_ipi     ? ifid_q.instr[19:15] :
               id_ctrl.reg_dst ? ifid_q.instr[15:11] : ifid_q.instr[20:16];
  end

  reg_file u_rf (
    .clk, .rst_n,
    .read_reg_1(rr1), .read_reg_2(rr2), .read_reg_3(rr3), .read_reg_4(rr4),
    .read_data_1(rd1), .read_data_2(rd2), .read_data_3(rd3), .read_data_4(rd4),
    .read_data_sr(rdsr),
    .reg_write_1(wb_we1), .write_reg_1(wb_q.wreg1), .write_data_1(wb_wd1),
    .reg_write_2(wb_we2), .write_reg_2(wb_q.wreg2), .write_data_2(wb_q.kdata),
    .sr_we(wb_sr_we)
  );

  imm_unit u_imm (
    .instr(ifid_q.instr), .pc(ifid_q.pc), .zero_ext(id_ctrl.imm_zero),
    .imm(imm_id), .br_target(brt_id), .j_target(jt_id)
  );

  hazard_unit u_hz (
    .id_valid, .id_is_ipi(cu_is_ipi), .id_ipi_started(cu_started),
    .id_rs(rr1), .id_rs_used(rs_used), .id_rt(rr2), .id_rt_used(rt_used),
    .id_jump(id_ctrl.jump),
    .ex1_valid(ex1_q.valid), .ex1_is_ipi(ex1_q.ctrl.im), .ex1_mem_to_reg(ex1_q.ctrl.mem_to_reg),
    .ex1_reg_write(ex1_q.ctrl.reg_write1), .ex1_wreg(ex1_q.wreg1),
    .ex1_branch_taken(branch_taken),
    .ex2_valid(ex2_q.valid), .ma_valid(ma_q.valid), .ma_is_ipi(ma_q.ctrl.im),
    .stall, .flush_ifid, .flush_idex, .load_use, .ipi_entry, .ipi_drain
  );

  assign issue      = id_valid && !stall && !flush_idex;
  assign jump_taken = issue && id_ctrl.jump;

  always_comb begin
    id_rec            = '0;
    id_rec.valid      = issue;
    id_rec.pc         = ifid_q.pc;
    id_rec.ctrl       = id_ctrl;
    id_rec.rs_idx     = rr1;
    id_rec.rt_idx     = rr2;
    id_rec.rs_used    = rs_used;
    id_rec.rt_used    = rt_used;
    id_rec.wreg1      = wreg1_id;
    id_rec.wreg2      = ifid_q.instr[14:10];
    id_rec.shamt      = ifid_q.instr[10:6];
    id_rec.imm        = imm_id;
    id_rec.br_target  = brt_id;
    id_rec.a          = rd1;
    id_rec.b          = rd2;
    id_rec.c          = rd3;
    id_rec.sz         = rd4;
    id_rec.sr         = rdsr;
  end

  // PC and IF/ID: the PC holds while ID is stalled or holds a running IPI.
  logic ipi_hold;
  assign ipi_hold = cu_is_ipi && !cu_last;

  always_ff @(posedge clk) begin
    if (!rst_n)                  pc_q <= '0;
    else if (branch_taken)       pc_q <= ex1_q.br_target;
    else if (jump_taken)         pc_q <= jt_id;
    else if (!stall && !ipi_hold) pc_q <= pc_q + 32'd4;
  end

  assign ifid_d = '{valid: 1'b1, pc: pc_q, instr: instr_if};

  pipe_reg #(.T(ifid_t)) u_ifid (
    .clk, .rst_n, .en(!stall && !ipi_hold), .flush(flush_ifid), .d(ifid_d), .q(ifid_q)
  );

  pipe_reg #(.T(stage_t)) u_idex (
    .clk, .rst_n, .en(1'b1), .flush(flush_idex), .d(id_rec), .q(ex1_q)
  );

  // ================================================================ EX1
  fwd_e        fwd_a, fwd_b;
  logic [31:0] a_f, b_f, alu_b, alu1_y, bmar, bmaw, kmar;
  logic        alu1_zero, ex1_ipi;

  assign ex1_ipi = ex1_q.valid && ex1_q.ctrl.im;

  forward_unit u_fwd (
    .en(ex1_q.valid && !ex1_q.ctrl.im),
    .ex1_rs(ex1_q.rs_idx), .ex1_rs_used(ex1_q.rs_used),
    .ex1_rt(ex1_q.rt_idx), .ex1_rt_used(ex1_q.rt_used),
    .ma_valid(ma_q.valid), .ma_reg_write(ma_q.ctrl.reg_write1),
    .ma_mem_to_reg(ma_q.ctrl.mem_to_reg), .ma_wreg(ma_q.wreg1),
    .wb_valid(wb_q.valid), .wb_reg_write(wb_q.ctrl.reg_write1), .wb_wreg(wb_q.wreg1),
    .fwd_a, .fwd_b
  );

  always_comb begin
    unique case (fwd_a)
      FWD_MA:  a_f = ma_q.result;
      FWD_WB:  a_f = wb_wd1;
      default: a_f = ex1_q.a;
    endcase
    unique case (fwd_b)
      FWD_MA:  b_f = ma_q.result;
      FWD_WB:  b_f = wb_wd1;
      default: b_f = ex1_q.b;
    endcase
    if (ex1_q.ctrl.im) alu_b = ex1_q.ctrl.pix_scalar ? {4{ex1_q.b[7:0]}} : ex1_q.b;
    else               alu_b = ex1_q.ctrl.alu_src ? ex1_q.imm : b_f;
  end

  alu1 u_alu1 (.op(ex1_q.ctrl.alu1_op), .a(a_f), .b(alu_b), .shamt(ex1_q.shamt),
               .y(alu1_y), .zero(alu1_zero));

  assign branch_taken = ex1_q.valid && ex1_q.ctrl.br && (ex1_q.ctrl.bne ? !alu1_zero : alu1_zero);

  // ACU: Ad1 = Read_data_1 (block image start), Ad2 = Read_data_3 (result start),
  // Ad3 = Read_data_2 (kernel image start).
  acu u_acu (
    .clk, .rst_n, .en(ex1_ipi), .lo(ex1_q.ctrl.lo), .st(ex1_q.ctrl.st), .kr(ex1_q.ctrl.kr),
    .ad1(ex1_q.a), .ad2(ex1_q.c), .ad3(ex1_q.b), .bmar, .bmaw, .kmar
  );

  lpdu u_lpdu (
    .clk, .rst_n, .en(ex1_ipi), .lo(ex1_q.ctrl.lo), .sz(ex1_q.sz), .ad1(ex1_q.a),
    .bmar, .e(lpdu_e)
  );

  always_comb begin
    ex1_out            = ex1_q;
    ex1_out.a          = a_f;
    ex1_out.result     = alu1_y;
    ex1_out.store_data = b_f;
    if (ex1_q.ctrl.im) begin
      ex1_out.bmar = bmar;
      ex1_out.bmaw = bmaw;
      ex1_out.kmar = kmar;
      if (lpdu_e) begin               // past the last pixel: nothing more to read
        ex1_out.ctrl.mr         = 1'b0;
        ex1_out.ctrl.reg_write1 = 1'b0;
        ex1_out.ctrl.reg_write2 = 1'b0;
      end
    end
  end

  // ================================================================ EX2 (skipped unless ALU_EXE_St2)
  logic [31:0] alu2_y;

  pipe_reg #(.T(stage_t)) u_ex12 (
    .clk, .rst_n, .en(1'b1), .flush(!(ex1_q.valid && ex1_q.ctrl.alu_exe_st2)),
    .d(ex1_out), .q(ex2_q)
  );

  alu2 u_alu2 (.op(ex2_q.ctrl.alu2_op), .o1(ex2_q.result), .a(ex2_q.a), .sr(ex2_q.sr), .y(alu2_y));

  always_comb begin
    ex2_out        = ex2_q;
    ex2_out.result = alu2_y;
    // the MA input multiplexer: EX2 result when EX2 is in use, else EX1 directly
    if (ex2_q.valid)                                         ma_d = ex2_out;
    else if (ex1_out.valid && !ex1_out.ctrl.alu_exe_st2)     ma_d = ex1_out;
    else                                                     ma_d = '0;
  end

  // ================================================================ MA
  logic [31:0] bm_raddr, bm_waddr, bm_wdata, bm_rdata, km_rdata;
  logic        bm_we;

  pipe_reg #(.T(stage_t)) u_exma (
    .clk, .rst_n, .en(1'b1), .flush(1'b0), .d(ma_d), .q(ma_q)
  );

  always_comb begin
    bm_raddr = ma_q.ctrl.im ? ma_q.bmar   : ma_q.result;
    bm_waddr = ma_q.ctrl.im ? ma_q.bmaw   : ma_q.result;
    bm_wdata = ma_q.ctrl.im ? ma_q.result : ma_q.store_data;
    bm_we    = ma_q.valid && ma_q.ctrl.mw;
  end

  data_mem #(.BYTES(BMEM_BYTES)) u_bmem (
    .clk, .raddr(bm_raddr), .rdata(bm_rdata), .we(bm_we), .waddr(bm_waddr), .wdata(bm_wdata),
    .host_we(bmem_host_we), .host_addr(bmem_host_addr), .host_wdata(bmem_host_wdata),
    .host_rdata(bmem_host_rdata)
  );

  data_mem #(.BYTES(KMEM_BYTES)) u_kmem (
    .clk, .raddr(ma_q.kmar), .rdata(km_rdata), .we(1'b0), .waddr('0), .wdata('0),
    .host_we(kmem_host_we), .host_addr(kmem_host_addr), .host_wdata(kmem_host_wdata),
    .host_rdata(kmem_host_rdata)
  );

  always_comb begin
    ma_out       = ma_q;
    ma_out.bdata = bm_rdata;
    ma_out.kdata = km_rdata;
  end

  // ================================================================ WB
  pipe_reg #(.T(stage_t)) u_mawb (
    .clk, .rst_n, .en(1'b1), .flush(1'b0), .d(ma_out), .q(wb_q)
  );

  always_comb begin
    wb_wd1   = wb_q.ctrl.mem_to_reg ? wb_q.bdata : wb_q.result;
    wb_we1   = wb_q.valid && wb_q.ctrl.reg_write1;
    wb_we2   = wb_q.valid && wb_q.ctrl.reg_write2;
    wb_sr_we = wb_q.valid && wb_q.ctrl.sr_write;
  end

  // ================================================================ status
  assign pc = pc_q;

  always_comb begin
    events                   = '0;
    events.load_use_stall    = load_use && !branch_taken;
    events.ipi_entry_stall   = ipi_entry && !branch_taken;
    events.ipi_drain_stall   = ipi_drain && !branch_taken;
    events.branch_flush      = branch_taken;
    events.jump              = jump_taken;
    events.fwd_ma            = fwd_a == FWD_MA || fwd_b == FWD_MA;
    events.fwd_wb            = fwd_a == FWD_WB || fwd_b == FWD_WB;
    events.ipi_issue         = cu_is_ipi && issue;
    events.ipi_busy          = (cu_is_ipi && issue) || (ipi_drain && !branch_taken);
    events.ex2_used          = ex2_q.valid;
    events.ex2_skipped       = ex1_ipi && !ex1_q.ctrl.alu_exe_st2;
    events.last_pixel        = lpdu_e;
    events.mem_rw_same_cycle = ma_q.valid && ma_q.ctrl.mr && ma_q.ctrl.mw;
  end

  // EX2 and a stage-skipping instruction must never meet at the MA input.
  always_ff @(posedge clk)
    if (rst_n)
      assert (!(ex2_q.valid && ex1_q.valid && !ex1_q.ctrl.alu_exe_st2))
        else $error("cmips32: EX2 and EX1 both target MA");
endmodule
