// tepid_alu: 32-bit ALU of the TEPID processor with condition-code outputs.
//
// Operations: add, sub, and, orr, mov (passes operand 2, ignoring the first
// source) and mvn (complement of operand 2); cmp and tst use sub and and
// with the register write suppressed. Flags: N is bit 31 of the result, Z
// says the result is zero, C is the carry out of bit 31 and V is signed
// overflow. Subtraction is a + ~b + 1, so C = 1 means "no borrow" (as in
// ARM). The logical operations and the moves clear C and V. The operation
// list and the meaning of N, Z, C, V follow the architecture; the carry
// convention of sub and the C/V value after logical operations are this
// design's choices. Combinational.
module tepid_alu
  import tepid_pkg::*;
#(
  parameter int unsigned XLEN_P = 32
) (
  input  alu_op_e           op,
  input  logic [XLEN_P-1:0] a,
  input  logic [XLEN_P-1:0] b,
  output logic [XLEN_P-1:0] y,
  output flags_t            flags
);

  logic [XLEN_P:0]   sum;
  logic [XLEN_P-1:0] b_in;
  logic              is_arith;
  logic              carry_in;

  always_comb begin
    is_arith = (op == ALU_ADD) || (op == ALU_SUB);
    carry_in = (op == ALU_SUB);
    b_in     = (op == ALU_SUB) ? ~b : b;
    sum      = {1'b0, a} + {1'b0, b_in} + {{XLEN_P{1'b0}}, carry_in};
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum[XLEN_P-1:0];
      ALU_AND:          y = a & b;
      ALU_ORR:          y = a | b;
      ALU_MOV:          y = b;
      ALU_MVN:          y = ~b;
      default:          y = '0;
    endcase
    flags.n = y[XLEN_P-1];
    flags.z = (y == '0);
    flags.c = is_arith & sum[XLEN_P];
    flags.v = is_arith & (a[XLEN_P-1] == b_in[XLEN_P-1]) & (y[XLEN_P-1] != a[XLEN_P-1]);
  end

endmodule
