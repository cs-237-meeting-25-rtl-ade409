// tb_tepid_regfile: random test of the register file against an array
// model. Checks reset to zero, both write ports (port 1 wins on the same
// register), that r15 reads back pc_val and is never written, and all three
// read ports.
module tb_tepid_regfile;
  logic        clk = 0, rst = 1;
  logic [3:0]  ra1, ra2, ra3, wa1, wa2;
  logic [31:0] rd1, rd2, rd3, wd1, wd2, pc_val;
  logic        we1, we2;
  logic [31:0] model [15];
  int          checks = 0, failures = 0;

  tepid_regfile #(.NREGS_P(16)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] mread(logic [3:0] a);
    return (a == 15) ? pc_val : model[a];
  endfunction

  task automatic check_reads();
    #1;
    checks += 3;
    if (rd1 !== mread(ra1)) begin failures++; $display("FAIL rd1 r%0d %h exp %h", ra1, rd1, mread(ra1)); end
    if (rd2 !== mread(ra2)) begin failures++; $display("FAIL rd2 r%0d %h exp %h", ra2, rd2, mread(ra2)); end
    if (rd3 !== mread(ra3)) begin failures++; $display("FAIL rd3 r%0d %h exp %h", ra3, rd3, mread(ra3)); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we1 = 0; we2 = 0; wa1 = 0; wa2 = 0; wd1 = 0; wd2 = 0; pc_val = 32'h1234;
    ra1 = 0; ra2 = 0; ra3 = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 16; i++) begin
      ra1 = 4'(i); ra2 = 4'(15 - i); ra3 = 4'(i);
      check_reads();
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we1 = 1'($urandom); wa1 = 4'($urandom); wd1 = $urandom;
      we2 = 1'($urandom); wa2 = ($urandom_range(0, 3) == 0) ? wa1 : 4'($urandom); wd2 = $urandom;
      pc_val = $urandom;
      @(posedge clk);
      if (we2 && wa2 != 15) model[wa2] = wd2;
      if (we1 && wa1 != 15) model[wa1] = wd1;
      #1;
      ra1 = 4'($urandom); ra2 = 4'($urandom); ra3 = wa1;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
