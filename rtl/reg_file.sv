// reg_file: CMIPS_32 register file.
//
// Thirty-two 32-bit general-purpose registers and one special register SR. Four read
// ports serve the ID stage: ports 1 and 2 give rs and rt (ALU-1 operands, or the start
// addresses of the block and kernel images for an image instruction), port 3 gives rd
// (start address of the result image) and port 4 gives rz (image size). A fifth port
// always shows SR, the second operand of ALU-2. Two write ports come back from WB: an
// image instruction returns the block pixel word on port 1 and the kernel pixel word on
// port 2 in the same cycle; a standard instruction uses port 1 only. SR is written
// through its own enable (sr_we) with the port-1 data.
//
// Timing: writes take effect at the rising clock edge. Reads are combinational and
// write-first: a read of a register that WB writes in the same cycle returns the new
// value, as a register file written in the first half of the cycle and read in the
// second half would. Port 2 wins when both write ports name the same register.
// All registers, register 0 included, are ordinary storage (the design's examples use
// register number 0 as an operand holding data). Reset clears every register.
module reg_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] read_reg_1,
  input  logic [$clog2(NREGS)-1:0] read_reg_2,
  input  logic [$clog2(NREGS)-1:0] read_reg_3,
  input  logic [$clog2(NREGS)-1:0] read_reg_4,
  output logic [XLEN-1:0]          read_data_1,
  output logic [XLEN-1:0]          read_data_2,
  output logic [XLEN-1:0]          read_data_3,
  output logic [XLEN-1:0]          read_data_4,
  output logic [XLEN-1:0]          read_data_sr,
  input  logic                     reg_write_1,
  input  logic [$clog2(NREGS)-1:0] write_reg_1,
  input  logic [XLEN-1:0]          write_data_1,
  input  logic                     reg_write_2,
  input  logic [$clog2(NREGS)-1:0] write_reg_2,
  input  logic [XLEN-1:0]          write_data_2,
  input  logic                     sr_we
);
  localparam int unsigned AW = $clog2(NREGS);

  logic [XLEN-1:0] regs [NREGS];
  logic [XLEN-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
      sr <= '0;
    end else begin
      if (reg_write_1) regs[write_reg_1] <= write_data_1;
      if (reg_write_2) regs[write_reg_2] <= write_data_2;
      if (sr_we)       sr                <= write_data_1;
    end
  end

  function automatic logic [XLEN-1:0] rd(input logic [AW-1:0] idx);
    if (reg_write_2 && write_reg_2 == idx) return write_data_2;
    if (reg_write_1 && write_reg_1 == idx) return write_data_1;
    return regs[idx];
  endfunction

  always_comb begin
    read_data_1  = rd(read_reg_1);
    read_data_2  = rd(read_reg_2);
    read_data_3  = rd(read_reg_3);
    read_data_4  = rd(read_reg_4);
    read_data_sr = sr_we ? write_data_1 : sr;
  end
endmodule
