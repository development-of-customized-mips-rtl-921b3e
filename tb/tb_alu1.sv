// tb_alu1: self-checking test of ALU-1.
// Drives every operation with random and corner-case operands and compares against a
// reference written independently below (integer arithmetic, one pixel at a time, with
// explicit clamping to 0..255).
module tb_alu1;
  import cmips_pkg::*;
  alu1_op_e    op;
  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  logic        zero;
  int checks = 0, failures = 0;

  alu1 dut (.op, .a, .b, .shamt, .y, .zero);

  function automatic int clamp(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic logic [31:0] ref_y(input alu1_op_e o, input logic [31:0] x, input logic [31:0] z, input logic [4:0] s);
    logic [31:0] r;
    int pa, pb, q;
    case (o)
      A1_ADD:   return x + z;
      A1_SUB:   return x - z;
      A1_AND:   return x & z;
      A1_OR:    return x | z;
      A1_XOR:   return x ^ z;
      A1_NOR:   return ~(x | z);
      A1_SLT:   return (int'(x) < int'(z)) ? 1 : 0;
      A1_SLTU:  return (x < z) ? 1 : 0;
      A1_SLL:   return z << s;
      A1_SRL:   return z >> s;
      A1_SRA:   begin r = z; for (int i = 0; i < s; i++) r = {r[31], r[31:1]}; return r; end
      A1_LUI:   return z * 65536;
      A1_PASSA: return x;
      default: begin
        for (int i = 0; i < 4; i++) begin
          pa = int'(x[8*i +: 8]);
          pb = int'(z[8*i +: 8]);
          case (o)
            A1_PADDS: q = clamp(pa + pb);
            A1_PSUBS: q = clamp(pa - pb);
            A1_PBIN:  q = (pa >= pb) ? 255 : 0;
            A1_PNEG:  q = 255 - pa;
            A1_PTHR:  q = (pa >= pb) ? pa : 0;
            A1_PMULS: q = clamp(pa * pb);
            A1_PABSD: q = (pa > pb) ? pa - pb : pb - pa;
            default:  q = 0;
          endcase
          r[8*i +: 8] = 8'(q);
        end
        return r;
      end
    endcase
  endfunction

  task automatic check(input alu1_op_e o, input logic [31:0] x, input logic [31:0] z, input logic [4:0] s);
    logic [31:0] e;
    op = o; a = x; b = z; shamt = s;
    #1;
    e = ref_y(o, x, z, s);
    checks++;
    if (y !== e || zero !== (x == z)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h sh=%0d y=%h exp=%h", o.name(), x, z, s, y, e);
    end
  endtask

  alu1_op_e ops[20] = '{A1_ADD, A1_SUB, A1_AND, A1_OR, A1_XOR, A1_NOR, A1_SLT, A1_SLTU, A1_SLL,
                        A1_SRL, A1_SRA, A1_LUI, A1_PASSA, A1_PADDS, A1_PSUBS, A1_PBIN, A1_PNEG,
                        A1_PTHR, A1_PMULS, A1_PABSD};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ops[k]) begin
      check(ops[k], 32'hFF00_80FF, 32'h01FF_8001, 5'd4);
      check(ops[k], 32'h0000_0000, 32'hFFFF_FFFF, 5'd31);
      check(ops[k], 32'h8000_0000, 32'h0000_0001, 5'd1);
      for (int n = 0; n < 200; n++) check(ops[k], $urandom, $urandom, 5'($urandom));
    end
    // the worked examples: 70 + 20 = 90; brightness 200 + 100 clamps to 255
    check(A1_ADD, 32'd70, 32'd20, 5'd0);
    if (y != 32'd90) failures++;
    checks++;
    check(A1_PADDS, 32'h0A0A_0AC8, 32'h6464_6464, 5'd0);
    if (y != 32'h6E6E_6EFF) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
