// tepid_operand2: second-source-operand former of the TEPID processor.
//
// Instruction bits 14..0 describe the second operand. For the arithmetic
// and logical instructions with bit 14 clear, bits 13..9 are a base-2
// exponent and bits 8..0 an unsigned constant, and the operand is the
// constant shifted left by the exponent (bits shifted past bit 31 are
// lost). With bit 14 set, the operand is a third register (bits 3..0)
// shifted by a 5-bit amount (bits 10..6) with one of four shift operations
// (bits 5..4), done by tepid_shifter. For ldr, str and adr with bit 14
// clear, bits 13..0 are a signed word displacement added to the base
// register. The exponent/constant immediate and the field sizes of the
// shifted register follow the architecture; the mode bit, the field
// positions and the signed displacement of the memory instructions are
// this design's choices. Combinational.
//
//   op2_field : instruction bits 14..0
//   mem_form  : 1 for ldr, str and adr
//   rm_val    : value of the register named in bits 3..0
//   op2       : the operand
module tepid_operand2
  import tepid_pkg::*;
(
  input  logic [14:0] op2_field,
  input  logic        mem_form,
  input  logic [31:0] rm_val,
  output logic [31:0] op2
);

  logic [4:0]  exponent;
  logic [8:0]  constant;
  logic [31:0] imm_val;
  logic [31:0] disp_val;
  logic [31:0] shifted;

  assign exponent = op2_field[13:9];
  assign constant = op2_field[8:0];
  assign imm_val  = {23'd0, constant} << exponent;
  assign disp_val = {{18{op2_field[13]}}, op2_field[13:0]};

  tepid_shifter #(.W(32)) u_shifter (
    .din  (rm_val),
    .sh_op(shift_op_e'(op2_field[5:4])),
    .amt  (op2_field[10:6]),
    .dout (shifted)
  );

  always_comb begin
    if (op2_field[14])  op2 = shifted;
    else if (mem_form)  op2 = disp_val;
    else                op2 = imm_val;
  end

endmodule
