// tb_cmips32_full: the 55x55-pixel workload on the core at its default sizes.
//
// A synthetic 55x55 grey image (3025 pixels, 757 words) and a second image are loaded,
// then one program runs:
//   1. the standard-instruction loop that adds two images word by word (MOV, LW, LW, ADD,
//      SW, ADD, BNE per word; the loop counter steps by 4 bytes up to 3028);
//   2. AndIm R1, R2, R3, R4 with R1 = 10, R2 = 10, R3 = 3500, R4 = 3025: the register
//      numbers and values of the design's own AndIm example;
//   3. AddIm over the same image pair; each of these image instructions must occupy ID for
//      757 + 5 = 762 cycles;
//   4. ThIm1 (binary image, threshold 128);
//   5. EdgIm with SR = 40, written in place over the source image: a six-stage image
//      instruction, which must occupy ID for 757 + 7 = 764 cycles;
//   6. NagIm (negative) of that edge image, again in place.
// Every result word or pixel is compared with a reference computed here, the cycle counts
// of the loop and of AddIm are measured and the speedup is printed.
module tb_cmips32_full;
  import cmips_pkg::*;
  import cmips_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic        imem_we = 0, bm_we = 0, km_we = 0;
  logic [31:0] imem_waddr = 0, imem_wdata = 0, bm_addr = 0, km_addr = 0, pc;
  logic [7:0]  bm_wdata = 0, km_wdata = 0, bm_rdata, km_rdata;
  events_t     ev;
  int checks = 0, failures = 0;

  cmips32 dut (.clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata,
               .bmem_host_we(bm_we), .bmem_host_addr(bm_addr), .bmem_host_wdata(bm_wdata), .bmem_host_rdata(bm_rdata),
               .kmem_host_we(km_we), .kmem_host_addr(km_addr), .kmem_host_wdata(km_wdata), .kmem_host_rdata(km_rdata),
               .pc, .events(ev));

  always #5 clk = ~clk;

  localparam int N     = 55 * 55;        // pixels
  localparam int W     = (N + 3) / 4;    // words: 757
  localparam int SRC   = 10;             // image in block memory (and its copy in kernel memory)
  localparam int MASK  = 10100;          // second image, block-memory copy for the loop
  localparam int SIRES = 7000;           // loop result
  localparam int ANDR  = 3500;           // AndIm result
  localparam int ADDR  = 13200;          // AddIm result
  localparam int EDGE_SR = 40;           // edge threshold
  localparam int BINR  = MASK;           // ThIm1 result (the loop's copy is no longer needed)

  logic [7:0] img [N + 3];
  logic [7:0] msk [N + 3];
  logic [31:0] prog [$];
  int loop_pc, exit_pc, ipi_pc, end_pc;

  task automatic build;
    // registers for AddIm: r20 = image, r21 = second image (kernel memory), r22 = result, r23 = size
    prog.push_back(addi_(5, 0, 4 * W));        // loop bound, 3028 bytes
    loop_pc = prog.size();
    prog.push_back(addi_(6, 0, 0));            // MOV R6, 0
    prog.push_back(lw_(1, SRC, 6));            // first four pixels of the image
    prog.push_back(lw_(2, MASK, 6));           // first four pixels of the second image
    prog.push_back(add_(3, 1, 2));
    prog.push_back(sw_(3, SIRES, 6));
    prog.push_back(addi_(6, 6, 4));
    prog.push_back(bne_(6, 5, -6));
    exit_pc = prog.size();
    prog.push_back(addi_(1, 0, SRC));          // R1 = 10, R2 = 10, R3 = 3500, R4 = 3025
    prog.push_back(addi_(2, 0, SRC));
    prog.push_back(addi_(3, 0, ANDR));
    prog.push_back(addi_(4, 0, N));
    ipi_pc = prog.size();
    prog.push_back(ipi_(2, 1, 2, 3, 4));       // AndIm R1, R2, R3, R4
    prog.push_back(addi_(20, 0, SRC));
    prog.push_back(addi_(21, 0, SRC));
    prog.push_back(addi_(22, 0, ADDR));
    prog.push_back(addi_(23, 0, N));
    prog.push_back(ipi_(3, 20, 21, 22, 23));   // AddIm R20, R21, R22, R23
    prog.push_back(addi_(20, 0, SRC));
    prog.push_back(addi_(21, 0, 128));
    prog.push_back(addi_(22, 0, BINR));
    prog.push_back(ipi_(5, 20, 21, 22, 23));   // ThIm1: binary image
    prog.push_back(addi_(24, 0, EDGE_SR));
    prog.push_back(mtsr_(24));
    prog.push_back(addi_(20, 0, SRC));
    prog.push_back(addi_(21, 0, SRC));
    prog.push_back(addi_(22, 0, SRC));
    prog.push_back(ipi_(9, 20, 21, 22, 23));   // EdgIm: edge image, in place
    prog.push_back(addi_(20, 0, SRC));
    prog.push_back(addi_(22, 0, SRC));
    prog.push_back(ipi_(6, 20, 21, 22, 23));   // NagIm: negative, in place
    end_pc = prog.size();
    prog.push_back(j_(end_pc));
    prog.push_back(0);
  endtask

  task automatic read_b(input int a, output logic [7:0] d);
    bm_addr = a; #1; d = bm_rdata;
  endtask

  // cycle measurement
  longint cyc = 0, t_loop = -1, t_exit = -1;
  int busy_run = 0, run_idx = 0;
  logic ipi_seen = 1'b0;
  int busy_runs [5];
  int n_lu = 0, n_br = 0, n_fwd = 0, n_last = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pc == 4 * loop_pc && t_loop < 0) t_loop = cyc;
    // the fall-through instruction is also fetched on the wrong path of every taken branch:
    // the last fetch before any image instruction is the loop's exit
    if (pc == 4 * exit_pc && !ipi_seen) t_exit = cyc;
    if (ev.ipi_issue) ipi_seen = 1'b1;
    n_lu += ev.load_use_stall; n_br += ev.branch_flush; n_fwd += ev.fwd_ma | ev.fwd_wb; n_last += ev.last_pixel;
    if (ev.ipi_busy) busy_run++;
    else if (busy_run != 0) begin
      if (run_idx < 5) busy_runs[run_idx] = busy_run;
      run_idx++;
      busy_run = 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired at pc=%0d", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint si_cycles;
    build();
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_waddr = i; imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    for (int y = 0; y < 55; y++)
      for (int x = 0; x < 55; x++) begin
        img[55 * y + x] = 8'(x * 4 + y * 3 + (x * y) % 17);
        msk[55 * y + x] = 8'((x ^ y) * 3);
      end
    for (int i = N; i < N + 3; i++) begin img[i] = 0; msk[i] = 0; end
    for (int i = 0; i < N + 3; i++) begin
      @(negedge clk);
      bm_we = 1; bm_addr = SRC + i; bm_wdata = img[i];
      km_we = 1; km_addr = SRC + i; km_wdata = msk[i];
      @(negedge clk);
      bm_addr = MASK + i; bm_wdata = msk[i]; km_we = 0;
    end
    @(negedge clk); bm_we = 0;
    @(negedge clk); rst_n = 1;
    wait (pc == 4 * end_pc);
    repeat (10) @(posedge clk);
    @(negedge clk);

    // 1. word-wise sums of the loop (plain 32-bit ADD, as the loop does)
    for (int w = 0; w < W; w++) begin
      logic [31:0] a, b, s, g;
      for (int k = 0; k < 4; k++) begin
        logic [7:0] t;
        a[8*k +: 8] = img[4*w + k];
        b[8*k +: 8] = msk[4*w + k];
        read_b(SIRES + 4*w + k, t);
        g[8*k +: 8] = t;
      end
      s = a + b;
      checks++;
      if (g !== s) begin failures++; if (failures < 10) $display("FAIL loop word %0d: %h exp %h", w, g, s); end
    end
    // 2.-3. image instructions, pixel by pixel
    for (int i = 0; i < N; i++) begin
      logic [7:0] g;
      read_b(ANDR + i, g);
      checks++;
      if (g !== 8'(ref_pixel(2, img[i], msk[i], 0, 0))) begin failures++; if (failures < 10) $display("FAIL AndIm pixel %0d", i); end
      read_b(ADDR + i, g);
      checks++;
      if (g !== 8'(ref_pixel(3, img[i], msk[i], 0, 0))) begin failures++; if (failures < 10) $display("FAIL AddIm pixel %0d", i); end
      read_b(BINR + i, g);
      checks++;
      if (g !== 8'(ref_pixel(5, img[i], 0, 128, 0))) begin failures++; if (failures < 10) $display("FAIL ThIm1 pixel %0d", i); end
      read_b(SRC + i, g);
      checks++;
      if (g !== 8'(ref_pixel(6, ref_pixel(9, img[i], msk[i], 0, EDGE_SR), 0, 0, 0))) begin failures++; if (failures < 10) $display("FAIL EdgIm then NagIm pixel %0d", i); end
    end

    si_cycles = t_exit - t_loop;
    $display("standard-instruction loop: %0d cycles for %0d words (%0d load-use stalls, %0d taken branches)",
             si_cycles, W, n_lu, n_br);
    $display("AndIm: %0d cycles; AddIm: %0d; ThIm1: %0d; EdgIm: %0d; NagIm: %0d",
             busy_runs[0], busy_runs[1], busy_runs[2], busy_runs[3], busy_runs[4]);
    $display("speedup of AddIm over the loop: %0.2f", real'(si_cycles) / real'(busy_runs[1]));
    checks += 8;
    if (run_idx < 5) begin failures++; $display("FAIL image instructions not seen"); end
    else for (int k = 0; k < 5; k++)
      if (busy_runs[k] != W + (k == 3 ? 7 : 5)) begin
        failures++; $display("FAIL image instruction %0d took %0d cycles", k, busy_runs[k]);
      end
    if (n_last != 5) begin failures++; $display("FAIL last pixel detected %0d times", n_last); end
    // fetch of MOV to fetch of the first instruction after the loop: MOV, then per word
    // 6 instructions + 1 load-use stall + 2 slots flushed by the taken branch, except for the
    // last word, whose branch falls through
    if (si_cycles != 1 + 9 * W - 2) begin failures++; $display("FAIL loop cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
