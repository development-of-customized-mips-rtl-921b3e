// tb_pipe_reg: self-checking test of a pipeline register with a struct payload: load,
// hold (en = 0), flush to a bubble (flush beats en) and reset.
module tb_pipe_reg;
  typedef struct packed { logic valid; logic [15:0] data; } rec_t;
  logic clk = 0, rst_n = 0, en = 0, flush = 0;
  rec_t d, q, model;
  int checks = 0, failures = 0;

  pipe_reg #(.T(rec_t)) dut (.clk, .rst_n, .en, .flush, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (q !== '0) failures++;
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = $urandom_range(0, 1); flush = $urandom_range(0, 5) == 0; d = rec_t'($urandom);
      @(posedge clk);
      if (flush) model = '0; else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL n=%0d q=%h exp=%h", n, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
