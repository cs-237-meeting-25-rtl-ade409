// tepid_shifter: barrel shifter for the shifted-register operand.
//
// Shifts a register value by a 5-bit amount (0..31) with one of the four
// operations the architecture lists: shift left, logical shift right,
// arithmetic shift right and rotate right. The 2-bit encoding of the
// operation (tepid_pkg::shift_op_e) is this design's choice. A shift by 0
// passes the value unchanged for all four operations. Combinational.
module tepid_shifter
  import tepid_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         din,
  input  shift_op_e            sh_op,
  input  logic [$clog2(W)-1:0] amt,
  output logic [W-1:0]         dout
);

  always_comb begin
    unique case (sh_op)
      SH_LSL:  dout = din << amt;
      SH_LSR:  dout = din >> amt;
      SH_ASR:  dout = W'($signed(din) >>> amt);
      SH_ROR:  dout = (din >> amt) | (din << (W - int'(amt)));
      default: dout = din;
    endcase
  end

endmodule
