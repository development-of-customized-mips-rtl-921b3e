// instr_mem: instruction memory of the IF stage.
//
// WORDS 32-bit instruction words, read combinationally at the word address pc[.. : 2]
// (addresses wrap modulo the memory size). The instruction and data memories are
// separate, as in MIPS_32. A loader write port (word address, rising clock edge) fills
// the memory before the program runs. Contents are not reset.
module instr_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] pc,
  output logic [31:0] instr,
  input  logic        we,
  input  logic [31:0] waddr,   // word address
  input  logic [31:0] wdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr[AW-1:0]] <= wdata;

  assign instr = mem[pc[AW+1:2]];
endmodule
