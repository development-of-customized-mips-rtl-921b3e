// alu2: ALU-2 of the optional EX2 stage.
//
// Only image instructions that need a second operation per pixel pass through EX2; the
// others skip the stage. Its second operand is the special register SR. Two operations
// act on four packed 8-bit pixels:
//   A2_MULSR (gamma correction, GamIm): each pixel of the ALU-1 result o1 is multiplied
//            by SR and saturated at 255. A published simulation of this step shows
//            o1 = 3 per pixel and SR = 20 giving 60 per pixel, which this operation
//            reproduces; the instruction table writes SR as an exponent instead.
//   A2_EDGE  (edge detection, EdgIm): o1 holds |[rs]-[rt]| per pixel; the output is the
//            source pixel a where o1 >= SR and 0 elsewhere.
//   A2_PASS  returns o1 unchanged.
// SR is compared and multiplied as an unsigned 32-bit value (clipped to 255 for the
// multiply, which gives the same saturated product).
// Purely combinational; registered by the EX2-to-MA pipeline register.
module alu2
  import cmips_pkg::*;
(
  input  alu2_op_e    op,
  input  logic [31:0] o1,   // ALU-1 result
  input  logic [31:0] a,    // source pixels [rs]
  input  logic [31:0] sr,   // Read_data_SR
  output logic [31:0] y
);
  logic [7:0] sr8;
  assign sr8 = (sr > 32'd255) ? 8'hFF : sr[7:0];

  always_comb begin
    y = o1;
    for (int i = 0; i < 4; i++) begin
      logic [15:0] p;
      p = o1[8*i +: 8] * sr8;
      unique case (op)
        A2_MULSR: y[8*i +: 8] = (p > 16'd255) ? 8'hFF : p[7:0];
        A2_EDGE:  y[8*i +: 8] = ({24'b0, o1[8*i +: 8]} >= sr) ? a[8*i +: 8] : 8'h00;
        default:  y[8*i +: 8] = o1[8*i +: 8];
      endcase
    end
  end
endmodule
