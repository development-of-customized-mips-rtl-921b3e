// tb_lpdu: self-checking test of the Last Pixel Detection Unit.
// Steps BMAr from Ad1 by 4 per iteration, as the ACU does, and checks that e is raised
// exactly at the first address past the image (Ad1 + SZ rounded up to a whole word) and
// nowhere else, that SZR is kept while Lo = 1 (Ad1/SZ inputs change then), and that e is
// low when the unit is not enabled. Sizes include the 55x55 = 3025-pixel image.
module tb_lpdu;
  logic clk = 0, rst_n = 0, en = 0, lo = 0, e;
  logic [31:0] sz, ad1, bmar;
  int checks = 0, failures = 0;

  lpdu dut (.clk, .rst_n, .en, .lo, .sz, .ad1, .bmar, .e);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] start, input logic [31:0] size);
    int words, hits;
    words = (size + 3) / 4;
    hits  = 0;
    for (int j = 0; j <= words + 2; j++) begin
      @(negedge clk);
      en = 1; lo = (j > 0);
      ad1  = (j == 0) ? start : $urandom;
      sz   = (j == 0) ? size  : $urandom;
      bmar = start + 4*j;
      #1;
      checks++;
      if (e !== (j == words)) begin failures++; $display("FAIL start=%0d size=%0d j=%0d e=%0b", start, size, j, e); end
      if (e) hits++;
    end
    @(negedge clk); en = 0; lo = 1; bmar = start + 4*words; #1;
    checks++;
    if (e) begin failures++; $display("FAIL e while disabled"); end
    checks++;
    if (hits != 1) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(32'd10, 32'd3025);
    run(32'd0, 32'd16);
    run(32'd100, 32'd1);
    run(32'd7, 32'd0);
    run(32'd2000, 32'd37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
