// tb_tepid_operand2: test of the operand-2 former. Checks the
// exponent/constant immediate (constant times 2^exponent, truncated to 32
// bits), the signed displacement of memory instructions and the shifted
// register form, against values computed with plain arithmetic.
module tb_tepid_operand2;
  import tepid_pkg::*;

  logic [14:0] f;
  logic        mem_form;
  logic [31:0] rm_val, op2;
  int          checks = 0, failures = 0;

  tepid_operand2 dut (.op2_field(f), .mem_form(mem_form), .rm_val(rm_val), .op2(op2));

  task automatic expect_val(logic [31:0] exp, string what);
    #1;
    checks++;
    if (op2 !== exp) begin
      failures++;
      $display("FAIL %s f=%h mem=%b rm=%h got %h exp %h", what, f, mem_form, rm_val, op2, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned v;
    int unsigned c, e, a, s, r;
    // immediates: every exponent with random constants
    for (int k = 0; k < 500; k++) begin
      c = $urandom_range(0, 511); e = $urandom_range(0, 31);
      f = {1'b0, 5'(e), 9'(c)}; mem_form = 0; rm_val = $urandom;
      v = longint'(c) * (longint'(1) << e);
      expect_val(32'(v), "imm");
    end
    f = {1'b0, 5'd0, 9'd1}; mem_form = 0; expect_val(32'd1, "imm #1");
    f = {1'b0, 5'd23, 9'h1ff}; mem_form = 0; expect_val(32'hff80_0000, "imm top");
    // displacements
    for (int k = 0; k < 300; k++) begin
      int d;
      d = $urandom_range(0, 16383) - 8192;
      f = {1'b0, 14'(d)}; mem_form = 1; rm_val = $urandom;
      expect_val(32'(d), "disp");
    end
    // shifted registers (lsl, lsr as multiply/divide by 2^a; asr as signed divide
    // rounding down; ror as two pieces)
    for (int k = 0; k < 500; k++) begin
      logic [31:0] exp;
      s = $urandom_range(0, 3); a = $urandom_range(0, 31); r = $urandom_range(0, 15);
      rm_val = $urandom; mem_form = $urandom_range(0, 1);
      f = {1'b1, 3'b000, 5'(a), 2'(s), 4'(r)};
      case (s)
        0: exp = 32'(longint'(rm_val) * (longint'(1) << a));
        1: exp = 32'(longint'(rm_val) / (longint'(1) << a));
        2: begin
             longint sx, p2;
             sx = longint'($signed(rm_val)); p2 = longint'(1) << a;
             exp = 32'((sx >= 0) ? sx / p2 : -((-sx + p2 - 1) / p2));
           end
        default: exp = (a == 0) ? rm_val : 32'((longint'(rm_val) / (longint'(1) << a)) + (longint'(rm_val) * (longint'(1) << (32 - a))));
      endcase
      expect_val(exp, "shifted reg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
