// tepid_pkg: shared types and constants of the TEPID processor.
//
// TEPID is a small 32-bit, word-addressed, load/store RISC machine in the
// style of ARM: sixteen registers r0..r15 with r15 the program counter,
// a 4-bit leading field on every instruction that holds a 3-bit execution
// condition (bits 31..29) and a "set condition codes" bit (bit 28), and a
// 14-bit immediate built from a 5-bit exponent and a 9-bit constant.
//
// The condition encoding, the s bit, the immediate layout, the register
// count, the 24-bit address limit and the shift operations follow the
// architecture description. The numeric opcode values, the placement of
// the register fields, the branch and swi formats and the operand-2 mode
// bit are this design's own choices; they are collected here so the whole
// design reads them from one place:
//
//   [31:29] cond   [28] s   [27:23] opcode   [22:19] rd   [18:15] rn
//   [14:0]  operand 2
//     [14]=0 ALU ops : [13:9] exponent, [8:0] unsigned constant -> const << exp
//     [14]=0 ldr/str/adr : [13:0] signed word displacement
//     [14]=1 all     : [3:0] rm, [5:4] shift op, [10:6] shift amount
//   b / bl : [22:0] signed word offset, target = address of branch + 1 + offset
//   swi    : [13:0] service number
package tepid_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned ADDR_BITS = 24; // 24-bit word addresses
  localparam int unsigned NREGS  = 16;   // r0..r15
  localparam logic [3:0]  REG_LR = 4'd14;
  localparam logic [3:0]  REG_PC = 4'd15;

  // Condition field, instruction bits 31..29.
  typedef enum logic [2:0] {
    COND_AL = 3'b000,  // always
    COND_NV = 3'b001,  // never
    COND_EQ = 3'b010,  // Z = 1
    COND_NE = 3'b011,  // Z = 0
    COND_LT = 3'b100,  // N != V
    COND_LE = 3'b101,  // Z = 1 or N != V
    COND_GE = 3'b110,  // N = V
    COND_GT = 3'b111   // Z = 0 and N = V
  } cond_e;

  // Condition-code register contents.
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // Opcode field, instruction bits 27..23.
  typedef enum logic [4:0] {
    OP_ADD = 5'b00000,
    OP_SUB = 5'b00001,
    OP_AND = 5'b00010,
    OP_ORR = 5'b00011,
    OP_MOV = 5'b00100,
    OP_MVN = 5'b00101,
    OP_CMP = 5'b00110,
    OP_TST = 5'b00111,
    OP_B   = 5'b01000,
    OP_BL  = 5'b01001,
    OP_SWI = 5'b01111,
    OP_LDR = 5'b10000,
    OP_STR = 5'b10001,
    OP_ADR = 5'b10010
  } opcode_e;

  // ALU operations.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_ORR = 3'd3,
    ALU_MOV = 3'd4,
    ALU_MVN = 3'd5
  } alu_op_e;

  // Shift operations of the shifted-register operand.
  typedef enum logic [1:0] {
    SH_LSL = 2'b00,
    SH_LSR = 2'b01,
    SH_ASR = 2'b10,
    SH_ROR = 2'b11
  } shift_op_e;

  // Decoded control of one instruction.
  typedef struct packed {
    cond_e        cond;
    logic         set_flags;  // update N,Z,C,V from the ALU if executed
    alu_op_e      alu_op;
    logic         wr_rd;      // ALU result (or load data) goes to rd
    logic         is_ldr;
    logic         is_str;
    logic         is_adr;
    logic         is_b;
    logic         is_bl;
    logic         is_swi;
    logic         mem_form;   // operand 2 [14]=0 is a signed displacement
    logic [3:0]   rd;
    logic [3:0]   rn;
    logic [3:0]   rm;
    logic [14:0]  op2_field;
    logic [22:0]  br_off;
    logic [13:0]  swi_num;
  } ctl_t;

endpackage
