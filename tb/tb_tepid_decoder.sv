// tb_tepid_decoder: test of the instruction decoder. Builds instructions
// with the test assembler and checks the fields and control bits for every
// opcode, with random conditions, registers and s bits.
module tb_tepid_decoder;
  import tepid_pkg::*;
  import tepid_asm_pkg::*;

  logic [31:0] instr;
  ctl_t        ctl;
  int          checks = 0, failures = 0;

  tepid_decoder dut (.instr(instr), .ctl(ctl));

  task automatic expect_bit(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%h got %b exp %b", what, instr, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [4:0] ops [14] = '{ADD, SUB, AND, ORR, MOV, MVN, CMP, TST, B, BL, SWI, LDR, STR, ADR};
    for (int k = 0; k < 400; k++) begin
      bit [4:0] o; bit [2:0] c; bit s; bit [3:0] rd, rn; bit [14:0] o2;
      bit alu, wr, setf;
      o = ops[$urandom_range(0, 13)]; c = 3'($urandom); s = 1'($urandom);
      rd = 4'($urandom); rn = 4'($urandom); o2 = 15'($urandom);
      instr = (o == B || o == BL) ? br(o, $urandom_range(0, 1000), c) :
              (o == SWI) ? swi($urandom_range(0, 15), c) : op3(o, rd, rn, o2, c, s);
      #1;
      alu  = (o <= TST);
      wr   = (o <= MVN) || o == LDR || o == ADR;
      setf = (o == CMP || o == TST) || (alu && s);
      checks++;
      if (ctl.cond !== cond_e'(c)) begin failures++; $display("FAIL cond %h", instr); end
      expect_bit(ctl.set_flags, setf, "set_flags");
      expect_bit(ctl.wr_rd, wr, "wr_rd");
      expect_bit(ctl.is_ldr, o == LDR, "is_ldr");
      expect_bit(ctl.is_str, o == STR, "is_str");
      expect_bit(ctl.is_adr, o == ADR, "is_adr");
      expect_bit(ctl.is_b, o == B || o == BL, "is_b");
      expect_bit(ctl.is_bl, o == BL, "is_bl");
      expect_bit(ctl.is_swi, o == SWI, "is_swi");
      expect_bit(ctl.mem_form, o == LDR || o == STR || o == ADR, "mem_form");
      if (alu || o == LDR || o == STR || o == ADR) begin
        checks++;
        if (ctl.rd !== rd || ctl.rn !== rn || ctl.op2_field !== o2 || ctl.rm !== o2[3:0]) begin
          failures++; $display("FAIL fields %h", instr);
        end
      end
      if (alu) begin
        alu_op_e e;
        case (o)
          ADD: e = ALU_ADD;  SUB, CMP: e = ALU_SUB;  AND, TST: e = ALU_AND;
          ORR: e = ALU_ORR;  MOV: e = ALU_MOV;       default: e = ALU_MVN;
        endcase
        checks++;
        if (ctl.alu_op !== e) begin failures++; $display("FAIL alu_op %h", instr); end
      end
    end
    instr = swi(4); #1; checks++;
    if (ctl.swi_num !== 14'd4) begin failures++; $display("FAIL swi_num"); end
    instr = br(B, -3); #1; checks++;
    if (ctl.br_off !== 23'h7ffffd) begin failures++; $display("FAIL br_off"); end
    instr = 32'h0f80_0000; #1; checks++;   // unused opcode 11111: no effect
    if (ctl.wr_rd || ctl.set_flags || ctl.is_b || ctl.is_str || ctl.is_swi) begin
      failures++; $display("FAIL unused opcode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
