// tb_tepid_shifter: random and corner-case test of the barrel shifter.
// The expected value is computed bit by bit from the definition of each
// shift, not with the shift operators the design uses.
module tb_tepid_shifter;
  import tepid_pkg::*;

  logic [31:0] din, dout;
  shift_op_e   sh_op;
  logic [4:0]  amt;
  int          checks = 0, failures = 0;

  tepid_shifter #(.W(32)) dut (.din(din), .sh_op(sh_op), .amt(amt), .dout(dout));

  function automatic logic [31:0] model(logic [31:0] d, int op, int a);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      case (op)
        0: r[i] = (i - a >= 0) ? d[i-a] : 1'b0;
        1: r[i] = (i + a < 32) ? d[i+a] : 1'b0;
        2: r[i] = (i + a < 32) ? d[i+a] : d[31];
        default: r[i] = d[(i + a) % 32];
      endcase
    end
    return r;
  endfunction

  task automatic check(logic [31:0] d, int op, int a);
    din = d; sh_op = shift_op_e'(op); amt = 5'(a);
    #1;
    checks++;
    if (dout !== model(d, op, a)) begin
      failures++;
      $display("FAIL d=%h op=%0d amt=%0d got %h exp %h", d, op, a, dout, model(d, op, a));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++)
      for (int a = 0; a < 32; a++) begin
        check(32'h8000_0001, op, a);
        check(32'h7fff_fffe, op, a);
      end
    for (int k = 0; k < 2000; k++) check($urandom, $urandom_range(0, 3), $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
