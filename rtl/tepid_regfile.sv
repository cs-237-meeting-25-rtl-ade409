// tepid_regfile: register file of the TEPID processor.
//
// Holds the general registers r0..r14 (r13 is the stack pointer and r14
// the link register by convention only). r15 is the program counter and is
// not stored here: a read of r15 returns pc_val, supplied by the core, and
// a write to r15 is ignored here because the core turns it into a branch.
// Three combinational read ports serve the first source (rn), the shifted
// register (rm) and the store data (rd). Two write ports, written on the
// rising clock edge, serve the instruction's result and the second result
// of bl (link register) or swi (r0); if both name the same register, port 1
// wins. Synchronous reset clears all registers to zero, which is this
// design's choice. Sixteen architectural registers follow the architecture.
module tepid_regfile
  import tepid_pkg::*;
#(
  parameter int unsigned NREGS_P = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  ra1,
  output logic [31:0] rd1,
  input  logic [3:0]  ra2,
  output logic [31:0] rd2,
  input  logic [3:0]  ra3,
  output logic [31:0] rd3,
  input  logic [31:0] pc_val,
  input  logic        we1,
  input  logic [3:0]  wa1,
  input  logic [31:0] wd1,
  input  logic        we2,
  input  logic [3:0]  wa2,
  input  logic [31:0] wd2
);

  localparam int unsigned PC_IDX = NREGS_P - 1;

  logic [31:0] regs [NREGS_P-1];

  function automatic logic [31:0] rd_reg(input logic [3:0] a);
    if (32'(a) == PC_IDX) return pc_val;
    return regs[a];
  endfunction

  assign rd1 = rd_reg(ra1);
  assign rd2 = rd_reg(ra2);
  assign rd3 = rd_reg(ra3);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS_P) - 1; i++) regs[i] <= '0;
    end else begin
      if (we2 && 32'(wa2) != PC_IDX) regs[wa2] <= wd2;
      if (we1 && 32'(wa1) != PC_IDX) regs[wa1] <= wd1;
    end
  end

endmodule
