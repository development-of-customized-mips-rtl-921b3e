// tb_instr_mem: self-checking test of the instruction memory: loads random words through
// the loader port and reads them back by byte address (PC), including the wrap-around.
module tb_instr_mem;
  localparam int unsigned WORDS = 64;
  logic clk = 0, we = 0;
  logic [31:0] pc, instr, waddr, wdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (.clk, .pc, .instr, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = i; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      pc = 4 * $urandom_range(0, 2 * WORDS - 1);
      #1;
      checks++;
      if (instr !== model[(pc / 4) % WORDS]) begin failures++; $display("FAIL pc=%0d", pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
