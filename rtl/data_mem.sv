// data_mem: byte-addressed data memory used for the block memory and the kernel memory.
//
// The core sees one 32-bit read port and one 32-bit write port, both byte-addressed and
// little-endian: a word at address X is bytes X..X+3, with byte X in bits [7:0]. Addresses
// need not be word-aligned (image start addresses such as 10 occur) and wrap modulo BYTES.
// The MA stage of an image instruction reads the next pixel word and writes a result word
// in the same cycle; a standard load or store uses one of the two ports.
// A separate byte-wide host port loads images and reads results back; a core write wins
// over a host write to the same byte in the same cycle.
// Timing: reads are combinational (data is valid within the MA cycle), writes happen at
// the rising clock edge, so a read in the cycle of a write to the same bytes returns the
// old data. The design reads on one clock edge and writes on the other; this
// implementation uses one edge and the read-before-write order that gives the same result.
// Memory contents are not reset.
module data_mem #(
  parameter int unsigned BYTES = 8192
) (
  input  logic        clk,
  // core read port
  input  logic [31:0] raddr,
  output logic [31:0] rdata,
  // core write port
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata,
  // host byte port
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [7:0]  host_wdata,
  output logic [7:0]  host_rdata
);
  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];

  function automatic logic [AW-1:0] wrap(input logic [31:0] x, input int unsigned k);
    logic [31:0] s;
    s = x + k;
    return s[AW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr[AW-1:0]] <= host_wdata;
    if (we)
      for (int k = 0; k < 4; k++) mem[wrap(waddr, k)] <= wdata[8*k +: 8];
  end

  always_comb begin
    for (int k = 0; k < 4; k++) rdata[8*k +: 8] = mem[wrap(raddr, k)];
    host_rdata = mem[host_addr[AW-1:0]];
  end
endmodule
