// pipe_reg: one pipeline register between two stages.
//
// Holds a value of type T (the stage record). On a rising edge it clears to all zeros
// (a bubble, with valid = 0 when T carries a valid bit) on reset or flush, loads d when en
// is high, and otherwise keeps its contents (a stall). Flush has priority over en.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic flush,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk) begin
    if (!rst_n || flush) q <= '0;
    else if (en)         q <= d;
  end
endmodule
