// tepid_decoder: instruction decoder of the TEPID processor.
//
// Splits a 32-bit instruction into its fields (see tepid_pkg for the
// layout) and derives the control of the single-cycle datapath. Bits 31..29
// are the execution condition and bit 28 the request to set the condition
// codes, as the architecture defines. cmp and tst always set the condition
// codes and write no register; mov and mvn ignore their first source.
// Only the arithmetic and logical instructions update the condition codes;
// the s bit of the other instructions is ignored. Unknown opcodes decode to
// an instruction with no effect. Combinational.
module tepid_decoder
  import tepid_pkg::*;
(
  input  logic [31:0] instr,
  output ctl_t        ctl
);

  opcode_e op;
  assign op = opcode_e'(instr[27:23]);

  always_comb begin
    ctl           = '0;
    ctl.cond      = cond_e'(instr[31:29]);
    ctl.rd        = instr[22:19];
    ctl.rn        = instr[18:15];
    ctl.rm        = instr[3:0];
    ctl.op2_field = instr[14:0];
    ctl.br_off    = instr[22:0];
    ctl.swi_num   = instr[13:0];
    ctl.alu_op    = ALU_ADD;
    unique case (op)
      OP_ADD: begin ctl.alu_op = ALU_ADD; ctl.wr_rd = 1'b1; ctl.set_flags = instr[28]; end
      OP_SUB: begin ctl.alu_op = ALU_SUB; ctl.wr_rd = 1'b1; ctl.set_flags = instr[28]; end
      OP_AND: begin ctl.alu_op = ALU_AND; ctl.wr_rd = 1'b1; ctl.set_flags = instr[28]; end
      OP_ORR: begin ctl.alu_op = ALU_ORR; ctl.wr_rd = 1'b1; ctl.set_flags = instr[28]; end
      OP_MOV: begin ctl.alu_op = ALU_MOV; ctl.wr_rd = 1'b1; ctl.set_flags = instr[28]; end
      OP_MVN: begin ctl.alu_op = ALU_MVN; ctl.wr_rd = 1'b1; ctl.set_flags = instr[28]; end
      OP_CMP: begin ctl.alu_op = ALU_SUB; ctl.set_flags = 1'b1; end
      OP_TST: begin ctl.alu_op = ALU_AND; ctl.set_flags = 1'b1; end
      OP_B:   ctl.is_b = 1'b1;
      OP_BL:  begin ctl.is_b = 1'b1; ctl.is_bl = 1'b1; end
      OP_SWI: ctl.is_swi = 1'b1;
      OP_LDR: begin ctl.is_ldr = 1'b1; ctl.mem_form = 1'b1; ctl.wr_rd = 1'b1; end
      OP_STR: begin ctl.is_str = 1'b1; ctl.mem_form = 1'b1; end
      OP_ADR: begin ctl.is_adr = 1'b1; ctl.mem_form = 1'b1; ctl.wr_rd = 1'b1; end
      default: ;
    endcase
  end

endmodule
