// tb_reg_file: self-checking test of the register file.
// Random writes on both ports and SR against a shadow array; checks all four read ports,
// the SR port, the write-first read of a register written in the same cycle, port-2
// priority on a shared destination and that register 0 is ordinary storage.
module tb_reg_file;
  logic clk = 0, rst_n = 0;
  logic [4:0]  rr1, rr2, rr3, rr4, wr1, wr2;
  logic [31:0] rd1, rd2, rd3, rd4, rdsr, wd1, wd2;
  logic        we1 = 0, we2 = 0, sr_we = 0;
  logic [31:0] shadow [32];
  logic [31:0] sr_shadow;
  int checks = 0, failures = 0;

  reg_file dut (.clk, .rst_n, .read_reg_1(rr1), .read_reg_2(rr2), .read_reg_3(rr3), .read_reg_4(rr4),
                .read_data_1(rd1), .read_data_2(rd2), .read_data_3(rd3), .read_data_4(rd4),
                .read_data_sr(rdsr), .reg_write_1(we1), .write_reg_1(wr1), .write_data_1(wd1),
                .reg_write_2(we2), .write_reg_2(wr2), .write_data_2(wd2), .sr_we);

  always #5 clk = ~clk;

  function automatic logic [31:0] expect_rd(input logic [4:0] r);
    if (we2 && wr2 == r) return wd2;
    if (we1 && wr1 == r) return wd1;
    return shadow[r];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rr1 = 0; rr2 = 0; rr3 = 0; rr4 = 0; wr1 = 0; wr2 = 0; wd1 = 0; wd2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (shadow[i]) shadow[i] = 0;
    sr_shadow = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we1 = $urandom_range(0, 1); we2 = $urandom_range(0, 2) == 0; sr_we = $urandom_range(0, 9) == 0;
      wr1 = 5'($urandom); wr2 = (n % 50 == 0) ? wr1 : 5'($urandom);
      wd1 = $urandom; wd2 = $urandom;
      rr1 = 5'($urandom); rr2 = (n % 3 == 0) ? wr1 : 5'($urandom);
      rr3 = (n % 5 == 0) ? wr2 : 5'($urandom); rr4 = 5'($urandom);
      if (n == 7) begin we1 = 1; wr1 = 0; wd1 = 32'hCAFE_0000; rr1 = 0; end
      #1;
      checks += 5;
      if (rd1 !== expect_rd(rr1)) begin failures++; $display("FAIL rd1 r%0d %h", rr1, rd1); end
      if (rd2 !== expect_rd(rr2)) begin failures++; $display("FAIL rd2 r%0d %h", rr2, rd2); end
      if (rd3 !== expect_rd(rr3)) begin failures++; $display("FAIL rd3 r%0d %h", rr3, rd3); end
      if (rd4 !== expect_rd(rr4)) begin failures++; $display("FAIL rd4 r%0d %h", rr4, rd4); end
      if (rdsr !== (sr_we ? wd1 : sr_shadow)) begin failures++; $display("FAIL sr %h", rdsr); end
      @(posedge clk);
      if (we1) shadow[wr1] = wd1;
      if (we2) shadow[wr2] = wd2;
      if (sr_we) sr_shadow = wd1;
    end
    @(negedge clk); we1 = 0; we2 = 0; sr_we = 0; rr1 = 0; #1;
    checks++;
    if (rd1 !== shadow[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
