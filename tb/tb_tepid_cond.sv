// tb_tepid_cond: exhaustive test of the condition check. All 8 conditions
// are tried against all 16 combinations of N, Z, C, V and compared with the
// condition table written out independently below.
module tb_tepid_cond;
  import tepid_pkg::*;

  cond_e  cond;
  flags_t flags;
  logic   pass;
  int     checks = 0, failures = 0;

  tepid_cond dut (.cond(cond), .flags(flags), .pass(pass));

  function automatic bit expect_pass(int c, bit n, bit z, bit v);
    case (c)
      0: return 1;
      1: return 0;
      2: return z == 1;
      3: return z == 0;
      4: return n != v;
      5: return (z == 1) || (n != v);
      6: return n == v;
      default: return (z == 0) && (n == v);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int f = 0; f < 16; f++) begin
        cond  = cond_e'(c);
        flags = flags_t'(f);
        #1;
        checks++;
        if (pass !== expect_pass(c, f[3], f[2], f[0])) begin
          failures++;
          $display("FAIL cond=%0d nzcv=%b pass=%b", c, f[3:0], pass);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
