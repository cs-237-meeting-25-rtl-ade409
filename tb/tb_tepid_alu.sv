// tb_tepid_alu: test of the ALU and its N, Z, C, V outputs. Expected
// results come from 64-bit integer arithmetic: C is bit 32 of the unsigned
// sum (a + (~b) + 1 for sub), V compares the 32-bit result with the exact
// signed result.
module tb_tepid_alu;
  import tepid_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  flags_t      fl;
  int          checks = 0, failures = 0;

  tepid_alu #(.XLEN_P(32)) dut (.op(op), .a(a), .b(b), .y(y), .flags(fl));

  task automatic check(int o, logic [31:0] x, logic [31:0] z);
    longint unsigned us;
    longint          ss;
    logic [31:0]     ey;
    bit              ec, ev;
    logic [31:0]     nz;
    nz = ~z;
    op = alu_op_e'(o); a = x; b = z;
    ec = 0; ev = 0;
    case (o)
      0: begin us = longint'(x) + longint'(z); ss = longint'($signed(x)) + longint'($signed(z));
               ey = 32'(us); ec = us[32]; ev = (ss != longint'($signed(ey))); end
      1: begin us = longint'(x) + longint'(nz) + 1; ss = longint'($signed(x)) - longint'($signed(z));
               ey = 32'(us); ec = us[32]; ev = (ss != longint'($signed(ey))); end
      2: ey = x & z;
      3: ey = x | z;
      4: ey = z;
      default: ey = ~z;
    endcase
    #1;
    checks++;
    if (y !== ey || fl.n !== ey[31] || fl.z !== (ey == 0) || fl.c !== ec || fl.v !== ev) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h nzcv=%b exp y=%h nzcv=%b%b%b%b", o, x, z, y, fl,
               ey, ey[31], ey == 0, ec, ev);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h5555_5555};
    for (int o = 0; o < 6; o++)
      foreach (corner[i]) foreach (corner[j]) check(o, corner[i], corner[j]);
    for (int k = 0; k < 3000; k++) check($urandom_range(0, 5), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
