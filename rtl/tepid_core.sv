// tepid_core: single-cycle TEPID processor.
//
// Every clock cycle the core fetches the instruction at the program counter,
// decodes it, tests its condition against the condition codes, forms
// operand 2, runs the ALU and commits the result, in the manner of the
// textbook single-cycle MIPS datapath. The TEPID-specific parts are:
//   * conditional execution: an instruction whose condition fails changes
//     nothing but the PC (tepid_cond);
//   * condition codes N, Z, C, V, updated by an ALU instruction with the s
//     bit set, and always by cmp and tst;
//   * r15 is the PC: reading r15 gives the address of the next instruction,
//     and any instruction that writes r15 (an ALU op, adr or ldr) branches
//     to the written value;
//   * ldr/str/adr address memory in words as base register + operand 2;
//   * b and bl branch PC-relative; bl also writes the return address into
//     r14;
//   * swi hands the service number and r0 to an external unit and waits
//     for its acknowledgement, optionally loading r0 from it.
// The condition semantics, the s bit, r15 as PC and the instruction set
// follow the architecture; the encodings (tepid_pkg), the value read from
// r15, the branch offset base and the swi handshake are this design's.
//
// Interface: fetch and data memory ports read combinationally (data written
// on the clock edge); swi_req/swi_ack as in tepid_swi_unit; halt freezes
// all state. One instruction completes per cycle except a swi that is not
// yet acknowledged, which stalls.
module tepid_core
  import tepid_pkg::*;
#(
  parameter int unsigned ADDR_W = ADDR_BITS
) (
  input  logic              clk,
  input  logic              rst,
  output logic [ADDR_W-1:0] imem_addr,
  input  logic [31:0]       imem_rdata,
  output logic [ADDR_W-1:0] dmem_addr,
  output logic              dmem_we,
  output logic [31:0]       dmem_wdata,
  input  logic [31:0]       dmem_rdata,
  output logic              swi_req,
  output logic [13:0]       swi_num,
  output logic [31:0]       swi_arg,
  input  logic              swi_ack,
  input  logic              swi_wr,
  input  logic [31:0]       swi_rdata,
  input  logic              halt
);

  logic [ADDR_W-1:0] pc, pc_plus1, pc_next, br_target;
  flags_t            flags;
  ctl_t              ctl;
  logic              pass, exec, stall, wr_pc;
  logic [31:0]       rn_val, rm_val, rd_val, op2, alu_y, result, r0_val;
  alu_op_e           alu_op;
  flags_t            alu_flags;
  logic              we1, we2;
  logic [3:0]        wa2;
  logic [31:0]       wd2;

  assign pc_plus1  = pc + 1'b1;
  assign imem_addr = pc;

  tepid_decoder u_dec (.instr(imem_rdata), .ctl(ctl));

  tepid_cond u_cond (.cond(ctl.cond), .flags(flags), .pass(pass));

  // r0 is read for swi through port 3 only when the instruction is a swi.
  tepid_regfile #(.NREGS_P(NREGS)) u_rf (
    .clk   (clk),
    .rst   (rst),
    .ra1   (ctl.rn),
    .rd1   (rn_val),
    .ra2   (ctl.rm),
    .rd2   (rm_val),
    .ra3   (ctl.is_swi ? 4'd0 : ctl.rd),
    .rd3   (rd_val),
    .pc_val(32'(pc_plus1)),
    .we1   (we1),
    .wa1   (ctl.rd),
    .wd1   (result),
    .we2   (we2),
    .wa2   (wa2),
    .wd2   (wd2)
  );
  assign r0_val = rd_val;

  tepid_operand2 u_op2 (
    .op2_field(ctl.op2_field),
    .mem_form (ctl.mem_form),
    .rm_val   (rm_val),
    .op2      (op2)
  );

  assign alu_op = ctl.mem_form ? ALU_ADD : ctl.alu_op;

  tepid_alu #(.XLEN_P(XLEN)) u_alu (
    .op   (alu_op),
    .a    (rn_val),
    .b    (op2),
    .y    (alu_y),
    .flags(alu_flags)
  );

  assign exec   = pass & ~halt;
  assign stall  = exec & ctl.is_swi & ~swi_ack;
  assign result = ctl.is_ldr ? dmem_rdata : alu_y;
  assign wr_pc  = exec & ctl.wr_rd & (ctl.rd == REG_PC);

  // Data memory.
  assign dmem_addr  = alu_y[ADDR_W-1:0];
  assign dmem_we    = exec & ctl.is_str;
  assign dmem_wdata = rd_val;

  // Software interrupt.
  assign swi_req = exec & ctl.is_swi;
  assign swi_num = ctl.swi_num;
  assign swi_arg = r0_val;

  // Register writes: port 1 the result, port 2 the link or swi result.
  assign we1 = exec & ctl.wr_rd & (ctl.rd != REG_PC);
  always_comb begin
    we2 = 1'b0;
    wa2 = REG_LR;
    wd2 = 32'(pc_plus1);
    if (exec && ctl.is_bl) begin
      we2 = 1'b1;
    end else if (exec && ctl.is_swi && swi_ack && swi_wr) begin
      we2 = 1'b1;
      wa2 = 4'd0;
      wd2 = swi_rdata;
    end
  end

  // Next program counter.
  assign br_target = ADDR_W'(32'(pc_plus1) + {{9{ctl.br_off[22]}}, ctl.br_off});
  always_comb begin
    if (halt || stall)           pc_next = pc;
    else if (exec && ctl.is_b)   pc_next = br_target;
    else if (wr_pc)              pc_next = result[ADDR_W-1:0];
    else                         pc_next = pc_plus1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= '0;
      flags <= '0;
    end else begin
      pc <= pc_next;
      if (exec && ctl.set_flags) flags <= alu_flags;
    end
  end

  // An acknowledgement only answers a pending request.
  a_swi_ack: assert property (@(posedge clk) disable iff (rst) swi_ack |-> swi_req);

endmodule
