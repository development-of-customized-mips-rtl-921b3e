// acu: Address Calculation Unit of the EX1 stage.
//
// During an image instruction the ACU, not ALU-1, produces the three memory addresses of
// each iteration: BMAr (block-memory read), BMAw (block-memory write) and KMAr
// (kernel-memory read). Three registers A, B and C keep the last address of each stream,
// and each output is either the start address or the previous address plus 4, one 32-bit
// word (four pixels) further:
//   BMAr = Lo ? A + 4 : Ad1
//   BMAw = St ? B + 4 : B, where B is loaded from Ad2 on the first iteration (Lo = 0)
//   KMAr = (Lo & Kr) ? C + 4 : (Lo ? C : Ad3)
// Lo is 0 only on the first iteration of the instruction; St turns on one iteration after
// the first result word has been written, so the write stream starts at Ad2. On every
// enabled cycle A, B and C take the new BMAr, BMAw and KMAr. The structure (a start-or-
// feedback multiplexer, a register and a 0/+4 adder per stream, the Kr-and-Lo gate on the
// kernel stream) follows the design's ACU circuit. When enable is low the registers hold.
// In the core, Ad2 is the result-image start (register rd) and Ad3 the kernel-image start
// (register rt).
module acu (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,     // an image-instruction iteration is in EX1
  input  logic        lo,
  input  logic        st,
  input  logic        kr,
  input  logic [31:0] ad1,
  input  logic [31:0] ad2,
  input  logic [31:0] ad3,
  output logic [31:0] bmar,
  output logic [31:0] bmaw,
  output logic [31:0] kmar
);
  logic [31:0] a_q, b_q, c_q;
  logic [31:0] a_base, b_base, c_base;

  always_comb begin
    a_base = lo ? a_q : ad1;
    b_base = lo ? b_q : ad2;
    c_base = lo ? c_q : ad3;
    bmar   = a_base + (lo        ? 32'd4 : 32'd0);
    bmaw   = b_base + (st        ? 32'd4 : 32'd0);
    kmar   = c_base + ((lo && kr) ? 32'd4 : 32'd0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
    end else if (en) begin
      a_q <= bmar;
      b_q <= bmaw;
      c_q <= kmar;
    end
  end
endmodule
