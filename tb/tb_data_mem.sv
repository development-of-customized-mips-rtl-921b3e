// tb_data_mem: self-checking test of the byte-addressed data memory.
// Host byte writes, unaligned 32-bit core writes and reads (little-endian, wrapping at the
// end of the memory) and a read and a write in one cycle are compared with a byte-array
// model kept by the testbench.
module tb_data_mem;
  localparam int unsigned BYTES = 256;
  logic clk = 0;
  logic [31:0] raddr, rdata, waddr, wdata, host_addr;
  logic        we = 0, host_we = 0;
  logic [7:0]  host_wdata, host_rdata;
  logic [7:0]  model [BYTES];
  int checks = 0, failures = 0;

  data_mem #(.BYTES(BYTES)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata,
                                 .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] model_word(input logic [31:0] ad);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = model[(ad + k) % BYTES];
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < BYTES; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = i; host_wdata = 8'(i * 7 + 3); model[i] = 8'(i * 7 + 3);
    end
    @(negedge clk); host_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      raddr = $urandom_range(0, BYTES - 1);
      we    = $urandom_range(0, 1);
      waddr = (n % 4 == 0) ? raddr : $urandom_range(0, BYTES - 1);
      wdata = $urandom;
      host_addr = $urandom_range(0, BYTES - 1);
      #1;
      checks += 2;
      if (rdata !== model_word(raddr)) begin failures++; $display("FAIL read @%0d %h exp %h", raddr, rdata, model_word(raddr)); end
      if (host_rdata !== model[host_addr]) begin failures++; $display("FAIL host read @%0d", host_addr); end
      @(posedge clk);
      if (we) for (int k = 0; k < 4; k++) model[(waddr + k) % BYTES] = wdata[8*k +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
