// tb_cmips32: end-to-end test of the CMIPS_32 core at its default sizes.
//
// Part A runs standard instructions that exercise forwarding from MA and WB, a load-use
// stall, taken and not-taken branches, a jump, loads and stores; results are stored to the
// block memory and read back through the host port. (It starts with the published R-type
// example: 70 + 20 = 90.)
// Part B runs all ten image instructions on small random images (sizes that are and are not
// multiples of four pixels), each followed by standard instructions, and compares every
// result pixel with a reference model; it also checks that no byte after the last result
// word is written, and that the instruction after an image instruction sees the registers
// it wrote back. For every image instruction it checks the number of cycles ID is busy:
// W + 5 for a five-stage and W + 7 for a six-stage instruction over W words.
// Every pipeline mechanism (stalls of each kind, flushes, forwarding from both stages, EX2
// use and bypass, last-pixel detection, simultaneous memory read and write) must occur.
module tb_cmips32;
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

  // ------------------------------------------------------------------ program
  logic [31:0] prog [$];
  localparam int SRC = 10, KER = 10, DST0 = 3500, RES = 200;
  localparam int NOPS = 10;
  int sizes  [NOPS] = '{37, 40, 37, 40, 12, 37, 40, 5, 37, 40};
  int scal   [NOPS] = '{50, 60, 0, 0, 0, 128, 0, 100, 0, 0};
  int srv    [NOPS] = '{0, 0, 0, 0, 0, 0, 0, 0, 3, 40};
  logic [7:0] img [64];
  logic [7:0] ker [64];
  int end_pc;

  function automatic int words(input int n); return (n + 3) / 4; endfunction

  task automatic build;
    // Part A: standard instructions (register 0 stays 0 after reset and is used as zero)
    prog.push_back(addi_(1, 0, 70));
    prog.push_back(addi_(2, 0, 20));
    prog.push_back(add_(3, 1, 2));          // 90, r2 from MA, r1 from WB
    prog.push_back(sw_(3, RES + 0, 0));
    prog.push_back(lw_(4, RES + 0, 0));
    prog.push_back(add_(5, 4, 4));          // load-use: 180
    prog.push_back(sub_(6, 5, 1));          // 110
    prog.push_back(sw_(5, RES + 4, 0));
    prog.push_back(sw_(6, RES + 8, 0));
    prog.push_back(beq_(6, 6, 1));          // taken: skip next
    prog.push_back(addi_(7, 0, 1));         // skipped
    prog.push_back(bne_(6, 6, 1));          // not taken
    prog.push_back(addi_(8, 0, 5));         // executed: 5
    prog.push_back(j_(prog.size() + 2));    // jump over next
    prog.push_back(addi_(8, 0, 99));        // skipped
    prog.push_back(sw_(7, RES + 12, 0));
    prog.push_back(sw_(8, RES + 16, 0));
    prog.push_back(ori_(9, 0, 16'h1234));
    prog.push_back(lui_(10, 16'hABCD));
    prog.push_back(slt_(11, 1, 2));         // 70 < 20 ? 0
    prog.push_back(sll_(12, 1, 2));         // 280
    prog.push_back(addi_(13, 0, 3));
    prog.push_back(addi_(13, 13, -1));      // loop: three passes
    prog.push_back(bne_(13, 0, -2));
    prog.push_back(add_(14, 9, 10));        // 0xABCD1234
    prog.push_back(sw_(14, RES + 20, 0));
    prog.push_back(sw_(11, RES + 24, 0));
    prog.push_back(sw_(12, RES + 28, 0));
    prog.push_back(sw_(13, RES + 32, 0));
    // Part B: the ten image instructions; rs = r20, rt = r21, rd = r22, rz = r23
    for (int op = 0; op < NOPS; op++) begin
      logic two;
      two = (op == 2 || op == 3 || op == 4 || op == 8 || op == 9);
      if (op >= 8) begin
        prog.push_back(addi_(25, 0, srv[op]));
        prog.push_back(mtsr_(25));
      end
      prog.push_back(addi_(20, 0, SRC));
      prog.push_back(addi_(21, 0, two ? KER : scal[op]));
      prog.push_back(addi_(22, 0, DST0 + 100 * op));
      prog.push_back(addi_(23, 0, sizes[op]));
      prog.push_back(ipi_(op, 20, 21, 22, 23));
      // first instruction after the IPI reads the register it wrote back
      prog.push_back(add_(24, 20, 0));
      prog.push_back(sw_(24, RES + 40 + 4 * op, 0));
    end
    end_pc = prog.size();
    prog.push_back(j_(end_pc));             // stop: jump to itself
    prog.push_back(0);
    prog.push_back(0);
  endtask

  // ------------------------------------------------------------------ helpers
  task automatic host_write_b(input int a, input logic [7:0] d);
    @(negedge clk); bm_we = 1; bm_addr = a; bm_wdata = d; @(negedge clk); bm_we = 0;
  endtask
  task automatic host_write_k(input int a, input logic [7:0] d);
    @(negedge clk); km_we = 1; km_addr = a; km_wdata = d; @(negedge clk); km_we = 0;
  endtask
  task automatic read_b(input int a, output logic [7:0] d);
    bm_addr = a; #1; d = bm_rdata;
  endtask
  task automatic read_w(input int a, output logic [31:0] w);
    for (int k = 0; k < 4; k++) begin logic [7:0] t; read_b(a + k, t); w[8*k +: 8] = t; end
  endtask
  task automatic expect_w(input string what, input int a, input logic [31:0] exp);
    logic [31:0] w;
    read_w(a, w);
    checks++;
    if (w !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, w, exp); end
  endtask

  // ------------------------------------------------------------------ event counters
  int n_lu, n_entry, n_drain, n_br, n_j, n_fma, n_fwb, n_issue, n_ex2, n_skip, n_last, n_rw;
  int busy_run, run_idx;
  int busy_runs [NOPS];
  always @(posedge clk) if (rst_n) begin
    n_lu    += ev.load_use_stall;
    n_entry += ev.ipi_entry_stall;
    n_drain += ev.ipi_drain_stall;
    n_br    += ev.branch_flush;
    n_j     += ev.jump;
    n_fma   += ev.fwd_ma;
    n_fwb   += ev.fwd_wb;
    n_issue += ev.ipi_issue;
    n_ex2   += ev.ex2_used;
    n_skip  += ev.ex2_skipped;
    n_last  += ev.last_pixel;
    n_rw    += ev.mem_rw_same_cycle;
    if (ev.ipi_busy) busy_run++;
    else if (busy_run != 0) begin
      if (run_idx < NOPS) busy_runs[run_idx] = busy_run;
      run_idx++;
      busy_run = 0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired at pc=%0d", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_lu, n_entry, n_drain, n_br, n_j, n_fma, n_fwb, n_issue, n_ex2, n_skip, n_last, n_rw} = '0;
    busy_run = 0; run_idx = 0;
    build();
    // load program and images while the core is held in reset
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_waddr = i; imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    for (int i = 0; i < 64; i++) begin
      img[i] = 8'($urandom);
      ker[i] = 8'($urandom_range(0, 15)) + ((i % 3 == 0) ? 8'd100 : 8'd0);
      host_write_b(SRC + i, img[i]);
      host_write_k(KER + i, ker[i]);
    end
    for (int a = DST0; a < DST0 + 100 * NOPS; a++) host_write_b(a, 8'hA5);
    for (int a = RES; a < RES + 100; a++) host_write_b(a, 8'h00);
    @(negedge clk); rst_n = 1;
    // run until the PC parks on the final self-jump and the pipeline has drained
    wait (pc == 4 * end_pc);
    repeat (10) @(posedge clk);
    @(negedge clk);

    // Part A
    expect_w("add 70+20", RES + 0, 32'd90);
    expect_w("load-use add", RES + 4, 32'd180);
    expect_w("sub", RES + 8, 32'd110);
    expect_w("branch skipped", RES + 12, 32'd0);
    expect_w("not taken / jump", RES + 16, 32'd5);
    expect_w("ori+lui", RES + 20, 32'hABCD_1234);
    expect_w("slt", RES + 24, 32'd0);
    expect_w("sll", RES + 28, 32'd280);
    expect_w("loop counter", RES + 32, 32'd0);

    // Part B
    for (int op = 0; op < NOPS; op++) begin
      int w;
      logic [31:0] lastw;
      logic [7:0]  got;
      w = words(sizes[op]);
      for (int i = 0; i < sizes[op]; i++) begin
        int exp;
        exp = ref_pixel(op, img[i], ker[i], scal[op], srv[op]);
        read_b(DST0 + 100 * op + i, got);
        checks++;
        if (got !== 8'(exp)) begin
          failures++;
          $display("FAIL op %0d pixel %0d: %0d expected %0d (p=%0d k=%0d)", op, i, got, exp, img[i], ker[i]);
        end
      end
      read_b(DST0 + 100 * op + 4 * w, got);
      checks++;
      if (got !== 8'hA5) begin failures++; $display("FAIL op %0d wrote past its last word", op); end
      for (int k = 0; k < 4; k++) lastw[8*k +: 8] = img[4 * (w - 1) + k];
      expect_w($sformatf("r20 after op %0d", op), RES + 40 + 4 * op, lastw);
      checks++;
      if (busy_runs[op] != w + ((op >= 8) ? 7 : 5)) begin
        failures++;
        $display("FAIL op %0d busy %0d cycles, expected %0d", op, busy_runs[op], w + ((op >= 8) ? 7 : 5));
      end
    end
    checks++;
    if (run_idx != NOPS) begin failures++; $display("FAIL %0d image instructions seen", run_idx); end

    // mechanisms
    $display("events: load-use %0d, ipi-entry %0d, ipi-drain %0d, branch %0d, jump %0d, fwd-ma %0d, fwd-wb %0d, ipi-iter %0d, ex2 %0d, ex2-skip %0d, last-pixel %0d, rd+wr %0d",
             n_lu, n_entry, n_drain, n_br, n_j, n_fma, n_fwb, n_issue, n_ex2, n_skip, n_last, n_rw);
    foreach (busy_runs[i]) $display("ipi %0d busy %0d", i, busy_runs[i]);
    checks += 12;
    if (n_lu == 0)    begin failures++; $display("FAIL no load-use stall"); end
    if (n_entry == 0) begin failures++; $display("FAIL no ipi entry stall"); end
    if (n_drain == 0) begin failures++; $display("FAIL no ipi drain stall"); end
    if (n_br == 0)    begin failures++; $display("FAIL no branch"); end
    if (n_j == 0)     begin failures++; $display("FAIL no jump"); end
    if (n_fma == 0)   begin failures++; $display("FAIL no MA forward"); end
    if (n_fwb == 0)   begin failures++; $display("FAIL no WB forward"); end
    if (n_issue == 0) begin failures++; $display("FAIL no ipi issue"); end
    if (n_ex2 == 0)   begin failures++; $display("FAIL EX2 never used"); end
    if (n_skip == 0)  begin failures++; $display("FAIL EX2 never skipped"); end
    if (n_last != NOPS) begin failures++; $display("FAIL last pixel seen %0d times", n_last); end
    if (n_rw == 0)    begin failures++; $display("FAIL no simultaneous read and write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
