// tepid_cond: execution-condition check of the TEPID processor.
//
// Every TEPID instruction carries a 3-bit condition in bits 31..29. This
// block compares it with the condition-code register (N, Z, C, V) and says
// whether the instruction takes effect. The eight conditions and their
// flag tests (always, never, eq, ne, lt, le, ge, gt) are the architecture's
// own table. The carry flag C takes part in none of them and is unused
// here. Purely combinational; the result is valid in the same cycle.
//
//   cond  : condition field of the instruction
//   flags : current condition codes
//   pass  : 1 when the instruction executes
module tepid_cond
  import tepid_pkg::*;
(
  input  cond_e  cond,
  input  flags_t flags,
  output logic   pass
);

  logic n_ne_v;
  assign n_ne_v = flags.n ^ flags.v;

  always_comb begin
    unique case (cond)
      COND_AL: pass = 1'b1;
      COND_NV: pass = 1'b0;
      COND_EQ: pass = flags.z;
      COND_NE: pass = ~flags.z;
      COND_LT: pass = n_ne_v;
      COND_LE: pass = flags.z | n_ne_v;
      COND_GE: pass = ~n_ne_v;
      COND_GT: pass = ~flags.z & ~n_ne_v;
      default: pass = 1'b0;
    endcase
  end

endmodule
