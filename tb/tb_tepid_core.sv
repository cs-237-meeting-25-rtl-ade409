// tb_tepid_core: program-level test of the single-cycle core. The
// testbench provides the memory (an associative array, so any 24-bit
// address works) and answers software interrupts itself. It runs the
// feature program of tepid_asm_pkg, which uses every instruction, both
// operand-2 forms, every condition class and r15 as source and
// destination, then checks the stored results, the console output and
// that the run took exactly one cycle per instruction plus the cycles
// swi #2 waited for input. It then runs the gcd program for several input
// pairs and checks result and cycle count the same way.
module tb_tepid_core;
  import tepid_asm_pkg::*;

  localparam int AW = 24;

  logic          clk = 0, rst = 1, halt;
  logic [AW-1:0] imem_addr, dmem_addr;
  logic [31:0]   imem_rdata, dmem_rdata, dmem_wdata;
  logic          dmem_we;
  logic          swi_req, swi_ack, swi_wr;
  logic [13:0]   swi_num;
  logic [31:0]   swi_arg, swi_rdata;

  logic [31:0] mem [int];
  int unsigned inputs [$];
  int unsigned outputs [$];
  int          wait_left, stall_cycles;
  int          checks = 0, failures = 0;

  tepid_core dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] rd(logic [AW-1:0] a);
    return mem.exists(int'(a)) ? mem[int'(a)] : 32'd0;
  endfunction
  assign imem_rdata = rd(imem_addr);
  assign dmem_rdata = rd(dmem_addr);

  // swi service: #2 delays 'wait_left' cycles before delivering the next input
  always_comb begin
    swi_ack = 0; swi_wr = 0; swi_rdata = 0;
    if (swi_req) begin
      if (swi_num == 2) begin
        swi_ack = (wait_left == 0);
        swi_wr = swi_ack;
        swi_rdata = (inputs.size() > 0) ? inputs[0] : 0;
      end else begin
        swi_ack = 1;
      end
    end
  end

  // memory writes (blocking: the array is dynamic)
  always @(posedge clk) if (!rst && !halt && dmem_we) mem[int'(dmem_addr)] = dmem_wdata;

  always @(posedge clk) begin
    if (!rst && !halt) begin
      if (swi_req && swi_num == 2) begin
        if (wait_left > 0) begin wait_left <= wait_left - 1; stall_cycles <= stall_cycles + 1; end
        else begin void'(inputs.pop_front()); wait_left <= 3; end
      end
      if (swi_req && swi_num == 4) outputs.push_back(swi_arg);
      if (swi_req && swi_num == 0) halt <= 1;
    end
  end

  task automatic expect_val(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // load a program, run it to halt, return cycles taken
  task automatic run(input bit [31:0] p [$], output int cycles);
    mem.delete();
    foreach (p[i]) mem[i] = p[i];
    outputs = {};
    rst = 1; halt = 0; wait_left = 3; stall_cycles = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    cycles = 0;
    while (!halt && cycles < 100000) begin
      @(posedge clk); #1 cycles++;
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [31:0] p [$];
    int cycles;
    int unsigned pairs [8][2] = '{'{0, 7}, '{12, 18}, '{35, 14}, '{17, 5}, '{9, 9}, '{1, 40}, '{100, 0}, '{221, 391}};

    prog_features(p);
    inputs = {32'd21};
    run(p, cycles);
    foreach (FEAT_EXPECT[i]) expect_val(rd(AW'(FEAT_BASE + i)), FEAT_EXPECT[i], $sformatf("feature word %0d", FEAT_BASE + i));
    expect_val(outputs.size(), 1, "feature output count");
    if (outputs.size() > 0) expect_val(outputs[0], 42, "feature output");
    expect_val(cycles, FEAT_INSTRS + stall_cycles, "feature cycles");
    expect_val(stall_cycles, 3, "feature swi stall");

    foreach (pairs[k]) begin
      prog_gcd(p);
      inputs = {pairs[k][0], pairs[k][1]};
      run(p, cycles);
      expect_val(outputs.size(), 1, "gcd output count");
      if (outputs.size() > 0) expect_val(outputs[0], gcd_ref(pairs[k][0], pairs[k][1]), $sformatf("gcd(%0d,%0d)", pairs[k][0], pairs[k][1]));
      expect_val(cycles, 7 + gcd_instrs(pairs[k][0], pairs[k][1]) + stall_cycles, "gcd cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
