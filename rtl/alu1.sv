// alu1: ALU-1 of the EX1 stage.
//
// For standard instructions it is the MIPS_32 integer ALU (add, subtract, logic, set-less-
// than, shifts by shamt, load-upper-immediate, pass-through) and its `zero` flag serves
// the beq/bne comparison. For image instructions it performs the first (often the only)
// per-pixel operation on four 8-bit unsigned pixels packed in each 32-bit operand:
// saturating add and subtract (brightness, image add/sub), AND, binary threshold,
// negative, threshold-to-zero, saturating multiply and absolute difference.
// The operation list per image instruction follows the design's instruction table;
// saturation at 0 and 255 is this implementation's choice, since the design does not say
// what happens when a pixel result leaves 0..255.
// Purely combinational; the result is registered by the EX1 pipeline register.
module alu1
  import cmips_pkg::*;
(
  input  alu1_op_e    op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y,
  output logic        zero
);
  function automatic logic [7:0] sat_add(input logic [7:0] x, input logic [7:0] z);
    logic [8:0] s;
    s = {1'b0, x} + {1'b0, z};
    return s[8] ? 8'hFF : s[7:0];
  endfunction

  function automatic logic [7:0] sat_sub(input logic [7:0] x, input logic [7:0] z);
    return (x > z) ? x - z : 8'h00;
  endfunction

  function automatic logic [7:0] sat_mul(input logic [7:0] x, input logic [7:0] z);
    logic [15:0] p;
    p = x * z;
    return (p > 16'd255) ? 8'hFF : p[7:0];
  endfunction

  function automatic logic [7:0] pix_op(input alu1_op_e o, input logic [7:0] x, input logic [7:0] z);
    unique case (o)
      A1_PADDS: return sat_add(x, z);
      A1_PSUBS: return sat_sub(x, z);
      A1_PBIN:  return (x >= z) ? 8'hFF : 8'h00;
      A1_PNEG:  return 8'hFF - x;
      A1_PTHR:  return (x >= z) ? x : 8'h00;
      A1_PMULS: return sat_mul(x, z);
      A1_PABSD: return (x >= z) ? x - z : z - x;
      default:  return 8'h00;
    endcase
  endfunction

  always_comb begin
    y = '0;
    unique case (op)
      A1_ADD:   y = a + b;
      A1_SUB:   y = a - b;
      A1_AND:   y = a & b;
      A1_OR:    y = a | b;
      A1_XOR:   y = a ^ b;
      A1_NOR:   y = ~(a | b);
      A1_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      A1_SLTU:  y = {31'b0, a < b};
      A1_SLL:   y = b << shamt;
      A1_SRL:   y = b >> shamt;
      A1_SRA:   y = $unsigned($signed(b) >>> shamt);
      A1_LUI:   y = {b[15:0], 16'b0};
      A1_PASSA: y = a;
      A1_PADDS, A1_PSUBS, A1_PBIN, A1_PNEG, A1_PTHR, A1_PMULS, A1_PABSD:
        for (int i = 0; i < 4; i++) y[8*i +: 8] = pix_op(op, a[8*i +: 8], b[8*i +: 8]);
      default:  y = '0;
    endcase
  end

  assign zero = (a == b);
endmodule
