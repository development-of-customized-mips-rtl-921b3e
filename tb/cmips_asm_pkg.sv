// cmips_asm_pkg: instruction encoders and a pixel reference model for the core testbenches.
// Each function returns one 32-bit instruction word, so a test program is written as a list
// of calls (add_, lw_, bne_, ipi_, ...). ref_pixel recomputes one result pixel of any image
// instruction with plain integer arithmetic, independently of the RTL.
// Standard instructions use the MIPS_32 formats; image instructions put 6'b111111 in
// Inst[31:26], the opcode in Inst[25:20] and rs, rt, rd, rz in the four 5-bit fields below.
package cmips_asm_pkg;
  function automatic logic [31:0] r_op(input int fn, input int rd, input int rs, input int rt, input int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_op(input int op, input int rt, input int rs, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] add_ (input int rd, input int rs, input int rt); return r_op(6'h20, rd, rs, rt); endfunction
  function automatic logic [31:0] sub_ (input int rd, input int rs, input int rt); return r_op(6'h22, rd, rs, rt); endfunction
  function automatic logic [31:0] and_ (input int rd, input int rs, input int rt); return r_op(6'h24, rd, rs, rt); endfunction
  function automatic logic [31:0] slt_ (input int rd, input int rs, input int rt); return r_op(6'h2A, rd, rs, rt); endfunction
  function automatic logic [31:0] sll_ (input int rd, input int rt, input int sh); return r_op(6'h00, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] mtsr_(input int rs);                            return r_op(6'h3F, 0, rs, 0); endfunction
  function automatic logic [31:0] addi_(input int rt, input int rs, input int imm); return i_op(6'h08, rt, rs, imm); endfunction
  function automatic logic [31:0] ori_ (input int rt, input int rs, input int imm); return i_op(6'h0D, rt, rs, imm); endfunction
  function automatic logic [31:0] lui_ (input int rt, input int imm);               return i_op(6'h0F, rt, 0, imm); endfunction
  function automatic logic [31:0] lw_  (input int rt, input int off, input int rs);  return i_op(6'h23, rt, rs, off); endfunction
  function automatic logic [31:0] sw_  (input int rt, input int off, input int rs);  return i_op(6'h2B, rt, rs, off); endfunction
  // branch offsets are in instructions, relative to the next instruction
  function automatic logic [31:0] beq_ (input int rs, input int rt, input int off);  return i_op(6'h04, rt, rs, off); endfunction
  function automatic logic [31:0] bne_ (input int rs, input int rt, input int off);  return i_op(6'h05, rt, rs, off); endfunction
  function automatic logic [31:0] j_   (input int word_index);                       return {6'h02, 26'(word_index)}; endfunction
  function automatic logic [31:0] ipi_ (input int op, input int rs, input int rt, input int rd, input int rz);
    return {6'h3F, 6'(op), 5'(rs), 5'(rt), 5'(rd), 5'(rz)};
  endfunction

  // Reference model of one pixel of each image instruction: p = block pixel, k = kernel
  // pixel, s = low byte of R(rt) (scalar), sr = SR.
  function automatic int ref_pixel(input int op, input int p, input int k, input int s, input longint sr);
    int t;
    case (op)
      0: return (p + s > 255) ? 255 : p + s;
      1: return (p - s < 0) ? 0 : p - s;
      2: return p & k;
      3: return (p + k > 255) ? 255 : p + k;
      4: return (p - k < 0) ? 0 : p - k;
      5: return (p >= s) ? 255 : 0;
      6: return 255 - p;
      7: return (p >= s) ? p : 0;
      8: begin t = (p * k > 255) ? 255 : p * k; return (longint'(t) * sr > 255) ? 255 : int'(longint'(t) * sr); end
      9: begin t = (p > k) ? p - k : k - p; return (longint'(t) >= sr) ? p : 0; end
      default: return 0;
    endcase
  endfunction
endpackage
