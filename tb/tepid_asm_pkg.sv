// tepid_asm_pkg: a tiny assembler for TEPID machine code, used by the
// testbenches to build programs. Each function returns one instruction
// word in the encoding documented in tepid_pkg:
//   [31:29] cond [28] s [27:23] opcode [22:19] rd [18:15] rn [14:0] operand 2
// The numbers are written out here again, independently of the RTL
// package, so that a wrong constant in either place shows up in a test.
package tepid_asm_pkg;

  // conditions
  localparam bit [2:0] AL = 3'd0, NV = 3'd1, EQ = 3'd2, NE = 3'd3,
                       LT = 3'd4, LE = 3'd5, GE = 3'd6, GT = 3'd7;
  // opcodes
  localparam bit [4:0] ADD = 5'h00, SUB = 5'h01, AND = 5'h02, ORR = 5'h03,
                       MOV = 5'h04, MVN = 5'h05, CMP = 5'h06, TST = 5'h07,
                       B = 5'h08, BL = 5'h09, SWI = 5'h0F,
                       LDR = 5'h10, STR = 5'h11, ADR = 5'h12;
  // shifts
  localparam bit [1:0] LSL = 2'd0, LSR = 2'd1, ASR = 2'd2, ROR = 2'd3;
  // registers
  localparam bit [3:0] SP = 4'd13, LR = 4'd14, PC = 4'd15;

  // operand 2: immediate value = c << e
  function automatic bit [14:0] imm(input int unsigned c, input int unsigned e = 0);
    return {1'b0, 5'(e), 9'(c)};
  endfunction
  // operand 2: register rm shifted
  function automatic bit [14:0] shr(input bit [3:0] rm, input bit [1:0] sh = LSL,
                                    input int unsigned amt = 0);
    return {1'b1, 3'b000, 5'(amt), sh, rm};
  endfunction
  // operand 2 of ldr/str/adr: signed word displacement
  function automatic bit [14:0] disp(input int d);
    return {1'b0, 14'(d)};
  endfunction

  function automatic bit [31:0] op3(input bit [4:0] op, input bit [3:0] rd, input bit [3:0] rn,
                                    input bit [14:0] o2, input bit [2:0] c = AL, input bit s = 0);
    return {c, s, op, rd, rn, o2};
  endfunction
  function automatic bit [31:0] br(input bit [4:0] op, input int off, input bit [2:0] c = AL);
    return {c, 1'b0, op, 23'(off)};
  endfunction
  function automatic bit [31:0] swi(input int unsigned n, input bit [2:0] c = AL);
    return {c, 1'b0, SWI, 4'd0, 4'd0, 1'b0, 14'(n)};
  endfunction

  // A NV-conditioned add: does nothing, used to pad programs.
  localparam bit [31:0] NOP = {NV, 1'b0, ADD, 4'd0, 4'd0, 15'd0};

  // Feature program: exercises every instruction, both operand-2 forms,
  // all four shifts, conditions and flags, r15 as source and destination,
  // bl / return through a load into pc, and swi #2, #4, #0. Results are
  // stored at words 256..270 (see FEAT_EXPECT) and it outputs 2 * input.
  // Dynamic length: FEAT_INSTRS instructions (plus swi #2 stall cycles).
  localparam int FEAT_INSTRS = 51;
  localparam int FEAT_BASE   = 256;
  localparam bit [31:0] FEAT_EXPECT [15] = '{
    32'd53, 32'hffff_ffd5, 32'd16, 32'd7, 32'hffff_ffff, 32'hf, 32'hffff_ffea,
    32'h8000_0002, 32'd5, 32'd18, 32'd250, 32'd77, 32'd38, 32'd53, 32'hffff_ffd5};

  function automatic void prog_features(ref bit [31:0] p [$]);
    p = {};
    p.push_back(op3(MOV, 1, 0, imm(5)));                 // 0  r1 = 5
    p.push_back(op3(MOV, 2, 0, imm(3, 4)));              // 1  r2 = 48
    p.push_back(op3(ADD, 3, 1, shr(2)));                 // 2  r3 = 53
    p.push_back(op3(SUB, 4, 1, shr(2)));                 // 3  r4 = -43
    p.push_back(op3(AND, 5, 2, shr(1, LSL, 4)));         // 4  r5 = 48 & 80 = 16
    p.push_back(op3(ORR, 6, 1, shr(2, LSR, 4)));         // 5  r6 = 5 | 3 = 7
    p.push_back(op3(MVN, 7, 0, imm(0)));                 // 6  r7 = ~0
    p.push_back(op3(MOV, 8, 0, shr(7, LSR, 28)));        // 7  r8 = 15
    p.push_back(op3(MOV, 9, 0, shr(4, ASR, 1)));         // 8  r9 = -22
    p.push_back(op3(MOV, 10, 0, shr(1, ROR, 1)));        // 9  r10 = 0x80000002
    p.push_back(op3(CMP, 0, 1, shr(2)));                 // 10 5 - 48: lt
    p.push_back(op3(MOV, 11, 0, imm(1), LT));            // 11 r11 = 1
    p.push_back(op3(MOV, 11, 0, imm(2), GE));            // 12 skipped
    p.push_back(op3(CMP, 0, 2, shr(1)));                 // 13 48 - 5: gt
    p.push_back(op3(ADD, 11, 11, imm(4), GT));           // 14 r11 = 5
    p.push_back(op3(ADD, 11, 11, imm(64), LE));          // 15 skipped
    p.push_back(op3(ADD, 12, 7, imm(1), AL, 1));         // 16 r12 = 0, Z C set
    p.push_back(op3(MOV, 12, 0, imm(9), NE));            // 17 skipped
    p.push_back(op3(ADD, 12, 12, imm(2), EQ));           // 18 r12 = 2
    p.push_back(op3(ADD, 12, 12, imm(1, 8), NV));        // 19 never
    p.push_back(op3(TST, 0, 1, imm(2)));                 // 20 5 & 2 = 0: Z
    p.push_back(op3(ORR, 12, 12, imm(1, 4), EQ));        // 21 r12 = 18
    p.push_back(op3(MOV, SP, 0, imm(1, 8)));             // 22 sp = 256
    for (int i = 3; i <= 12; i++)                        // 23..32 store r3..r12
      p.push_back(op3(STR, 4'(i), SP, disp(i - 3)));
    p.push_back(op3(LDR, 1, SP, disp(1)));               // 33 r1 = -43
    p.push_back(op3(ADR, 2, SP, disp(-6)));              // 34 r2 = 250
    p.push_back(op3(STR, 1, 2, disp(20)));               // 35 [270] = -43
    p.push_back(op3(STR, 2, SP, disp(10)));              // 36 [266] = 250
    p.push_back(br(BL, 6));                              // 37 call 44, lr = 38
    p.push_back(op3(STR, 0, SP, disp(11)));              // 38 [267] = 77
    p.push_back(br(B, 2));                               // 39 to 42
    p.push_back(op3(MOV, 0, 0, imm(1)));                 // 40 skipped
    p.push_back(swi(0));                                 // 41 skipped
    p.push_back(swi(2));                                 // 42 r0 = input
    p.push_back(br(B, 6));                               // 43 to 50
    p.push_back(op3(MOV, 0, 0, imm(77)));                // 44 subroutine
    p.push_back(op3(STR, LR, SP, disp(12)));             // 45 [268] = 38
    p.push_back(op3(LDR, PC, SP, disp(12)));             // 46 return to 38
    p.push_back(NOP); p.push_back(NOP); p.push_back(NOP);// 47..49
    p.push_back(op3(ADD, 0, 0, shr(0)));                 // 50 r0 = 2 * input
    p.push_back(swi(4));                                 // 51 output
    p.push_back(op3(ADD, 3, PC, imm(0)));                // 52 r3 = 53
    p.push_back(op3(STR, 3, SP, disp(13)));              // 53 [269] = 53
    p.push_back(op3(ADD, PC, PC, imm(1)));               // 54 jump to 56
    p.push_back(swi(4));                                 // 55 skipped
    p.push_back(swi(0));                                 // 56 halt
  endfunction

  // Greatest common divisor by repeated subtraction, recursive, as the
  // architecture's example: reads a and b (swi #2), prints gcd (swi #4),
  // halts. The return sequence pops the saved link with
  // "add sp,sp,#1; ldr pc,[sp,#-1]".
  function automatic void prog_gcd(ref bit [31:0] p [$]);
    p = {};
    p.push_back(swi(2));                                 // 0  main
    p.push_back(op3(MOV, 1, 0, shr(0)));                 // 1  r1 = a
    p.push_back(swi(2));                                 // 2
    p.push_back(op3(MOV, 2, 0, shr(0)));                 // 3  r2 = b
    p.push_back(br(BL, 2));                              // 4  bl gcd
    p.push_back(swi(4));                                 // 5
    p.push_back(swi(0));                                 // 6
    p.push_back(op3(SUB, SP, SP, imm(1)));               // 7  gcd
    p.push_back(op3(STR, LR, SP, disp(0)));              // 8
    p.push_back(op3(CMP, 0, 1, imm(0)));                 // 9
    p.push_back(br(B, 2, NE));                           // 10 bne else1
    p.push_back(op3(MOV, 0, 0, shr(2)));                 // 11
    p.push_back(br(B, 9));                               // 12 b return
    p.push_back(op3(CMP, 0, 1, shr(2)));                 // 13 else1
    p.push_back(br(B, 5, LE));                           // 14 ble else2
    p.push_back(op3(MOV, 0, 0, shr(2)));                 // 15
    p.push_back(op3(MOV, 2, 0, shr(1)));                 // 16
    p.push_back(op3(MOV, 1, 0, shr(0)));                 // 17
    p.push_back(br(BL, -12));                            // 18 bl gcd
    p.push_back(br(B, 2));                               // 19 b return
    p.push_back(op3(SUB, 2, 2, shr(1)));                 // 20 else2
    p.push_back(br(BL, -15));                            // 21 bl gcd
    p.push_back(op3(ADD, SP, SP, imm(1)));               // 22 return
    p.push_back(op3(LDR, PC, SP, disp(-1)));             // 23
  endfunction

  // Instructions the gcd program executes for inputs a, b (no stalls).
  function automatic int gcd_instrs(int unsigned a, int unsigned b);
    if (a == 0) return 8;
    if (a > b)  return 13 + gcd_instrs(b, a);
    return 10 + gcd_instrs(a, b - a);
  endfunction

  // Reference gcd by Euclid's remainder algorithm.
  function automatic int unsigned gcd_ref(int unsigned a, int unsigned b);
    while (a != 0) begin
      int unsigned t = b % a;
      b = a;
      a = t;
    end
    return b;
  endfunction

endpackage
