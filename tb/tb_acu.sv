// tb_acu: self-checking test of the Address Calculation Unit.
// Runs the Lo/St/Kr sequence of an image instruction (first iteration with Lo = 0, three
// iterations before St turns on, as for a five-stage instruction) and checks every output
// address against a counting model: read addresses Ad1 + 4j, kernel addresses Ad3 + 4j
// (held at Ad3 when Kr = 0) and write addresses Ad2 until St, then +4 per iteration.
// The example start addresses 10 / 3500 follow a published simulation trace.
module tb_acu;
  logic clk = 0, rst_n = 0, en = 0, lo = 0, st = 0, kr = 0;
  logic [31:0] ad1, ad2, ad3, bmar, bmaw, kmar;
  int checks = 0, failures = 0;

  acu dut (.clk, .rst_n, .en, .lo, .st, .kr, .ad1, .ad2, .ad3, .bmar, .bmaw, .kmar);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] s1, input logic [31:0] s2, input logic [31:0] s3,
                     input logic use_k, input int iters, input int lat);
    int writes;
    writes = 0;
    for (int j = 0; j < iters; j++) begin
      @(negedge clk);
      en = 1; kr = use_k; lo = (j > 0); st = (j > lat);
      ad1 = (j == 0) ? s1 : $urandom;   // the start addresses matter only when Lo = 0
      ad2 = (j == 0) ? s2 : $urandom;
      ad3 = (j == 0) ? s3 : $urandom;
      #1;
      checks += 3;
      if (bmar != s1 + 4*j) begin failures++; $display("FAIL j=%0d bmar=%0d", j, bmar); end
      if (kmar != (use_k ? s3 + 4*j : s3)) begin failures++; $display("FAIL j=%0d kmar=%0d", j, kmar); end
      if (bmaw != s2 + 4*((j > lat) ? j - lat : 0)) begin failures++; $display("FAIL j=%0d bmaw=%0d", j, bmaw); end
      // a disabled cycle in between must not move the registers
      if (j == 4) begin
        @(negedge clk); en = 0; lo = 1; st = 1;
      end
    end
    @(negedge clk); en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(32'd10, 32'd3500, 32'd10, 1'b1, 12, 3);
    run(32'd0, 32'd100, 32'd4000, 1'b0, 9, 4);
    run(32'hFFFF_FFF0, 32'd7, 32'd5, 1'b1, 10, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
