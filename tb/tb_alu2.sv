// tb_alu2: self-checking test of ALU-2 (EX2 gamma and edge steps).
// Includes the published gamma data point (3 per pixel times SR = 20 gives 60 per pixel)
// and random operands against an independent per-pixel reference.
module tb_alu2;
  import cmips_pkg::*;
  alu2_op_e    op;
  logic [31:0] o1, a, sr, y;
  int checks = 0, failures = 0;

  alu2 dut (.op, .o1, .a, .sr, .y);

  function automatic logic [31:0] ref_y(input alu2_op_e o, input logic [31:0] p, input logic [31:0] s, input logic [31:0] src);
    logic [31:0] r;
    longint q;
    for (int i = 0; i < 4; i++) begin
      case (o)
        A2_MULSR: begin q = longint'(p[8*i +: 8]) * longint'(s); r[8*i +: 8] = (q > 255) ? 8'd255 : 8'(q); end
        A2_EDGE:  r[8*i +: 8] = (longint'(p[8*i +: 8]) >= longint'(s)) ? src[8*i +: 8] : 8'd0;
        default:  r[8*i +: 8] = p[8*i +: 8];
      endcase
    end
    return r;
  endfunction

  task automatic check(input alu2_op_e o, input logic [31:0] p, input logic [31:0] s, input logic [31:0] src);
    logic [31:0] e;
    op = o; o1 = p; sr = s; a = src;
    #1;
    e = ref_y(o, p, s, src);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%s o1=%h sr=%0d a=%h y=%h exp=%h", o.name(), p, s, src, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(A2_MULSR, 32'h0303_0303, 32'd20, 32'h0A08_090B);
    checks++;
    if (y != 32'd1010580540) begin failures++; $display("FAIL published gamma point %0d", y); end
    check(A2_EDGE, 32'h0010_2030, 32'd20, 32'h1122_3344);
    checks++;
    if (y != 32'h0000_3344) begin failures++; $display("FAIL edge example %h", y); end
    check(A2_MULSR, 32'hFF01_0010, 32'd300, 32'h0);
    check(A2_EDGE,  32'hFFFF_FFFF, 32'd256, 32'hABCD_EF01);
    for (int n = 0; n < 500; n++) begin
      check(A2_MULSR, $urandom, $urandom_range(0, 40), $urandom);
      check(A2_EDGE,  $urandom, $urandom_range(0, 260), $urandom);
      check(A2_PASS,  $urandom, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
