// tb_tepid_top: end-to-end test of the complete TEPID computer at its full
// size (2^24-word memory). Programs are written into memory through the
// load port while reset is held. The gcd program is run for a set of
// fixed and random input pairs, the feature program once; the console
// input is offered late on purpose so that swi #2 stalls the core. Each
// run checks the console output, the halt, and the cycle count (one cycle
// per instruction plus stall cycles). The testbench also counts how often
// each mechanism of the machine happened and fails any that never did:
// condition-failed instructions, condition-code updates, bl, writes to r15
// by a load and by an ALU instruction, swi stalls, loads, stores, adr,
// shifted-register operands, exponent immediates and halts.
module tb_tepid_top;
  import tepid_asm_pkg::*;

  localparam int AW = 24;

  logic          clk = 0, rst = 1;
  logic          load_we;
  logic [AW-1:0] load_addr;
  logic [31:0]   load_data;
  logic          in_valid, in_ready, out_valid, halted;
  logic [31:0]   in_data, out_data;

  int unsigned inputs [$];
  int unsigned outputs [$];
  int          in_delay, stalls;
  int          checks = 0, failures = 0;

  typedef enum int {M_SKIP, M_FLAGS, M_BL, M_LDR_PC, M_ALU_PC, M_STALL, M_LOAD,
                    M_STORE, M_ADR, M_SHIFTREG, M_EXPIMM, M_HALT, M_NUM} mech_e;
  int mech [M_NUM];

  tepid_top dut (.*);

  always #5 clk = ~clk;

  // console input: each word is offered after 'in_delay' idle cycles
  int idle;
  assign in_valid = (inputs.size() > 0) && (idle >= in_delay);
  assign in_data  = (inputs.size() > 0) ? inputs[0] : 32'd0;

  always @(posedge clk) begin
    if (rst) idle <= 0;
    else if (in_ready) begin void'(inputs.pop_front()); idle <= 0; end
    else idle <= idle + 1;
    if (!rst && out_valid) outputs.push_back(out_data);
  end

  // mechanism counters, from the core's internal signals
  always @(posedge clk) if (!rst && !halted) begin
    if (!dut.u_core.pass)                                   mech[M_SKIP]++;
    if (dut.u_core.exec && dut.u_core.ctl.set_flags)        mech[M_FLAGS]++;
    if (dut.u_core.exec && dut.u_core.ctl.is_bl)            mech[M_BL]++;
    if (dut.u_core.wr_pc && dut.u_core.ctl.is_ldr)          mech[M_LDR_PC]++;
    if (dut.u_core.wr_pc && !dut.u_core.ctl.mem_form)       mech[M_ALU_PC]++;
    if (dut.u_core.stall)                                   begin mech[M_STALL]++; stalls++; end
    if (dut.u_core.exec && dut.u_core.ctl.is_ldr)           mech[M_LOAD]++;
    if (dut.u_core.dmem_we)                                 mech[M_STORE]++;
    if (dut.u_core.exec && dut.u_core.ctl.is_adr)           mech[M_ADR]++;
    if (dut.u_core.exec && dut.u_core.ctl.op2_field[14] &&
        (dut.u_core.ctl.wr_rd || dut.u_core.ctl.set_flags) &&
        dut.u_core.ctl.op2_field[10:6] != 0)                mech[M_SHIFTREG]++;
    if (dut.u_core.exec && !dut.u_core.ctl.mem_form && !dut.u_core.ctl.op2_field[14] &&
        dut.u_core.ctl.op2_field[13:9] != 0 &&
        (dut.u_core.ctl.wr_rd || dut.u_core.ctl.set_flags)) mech[M_EXPIMM]++;
    if (dut.u_core.swi_req && dut.u_core.swi_num == 0)      mech[M_HALT]++;
  end

  task automatic expect_val(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  task automatic run(input bit [31:0] p [$], output int cycles);
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    @(negedge clk);
    foreach (p[i]) begin
      load_we = 1; load_addr = AW'(i); load_data = p[i];
      @(negedge clk);
    end
    load_we = 0;
    outputs = {}; stalls = 0;
    @(negedge clk) rst = 0;
    cycles = 0;
    while (!halted && cycles < 200000) begin
      @(posedge clk); #1 cycles++;
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [31:0] p [$];
    int cycles;
    int unsigned a, b;

    // feature program
    prog_features(p);
    inputs = {32'd1000};
    in_delay = 5;
    run(p, cycles);
    expect_val(halted, 1, "feature halted");
    expect_val(outputs.size(), 1, "feature output count");
    if (outputs.size() > 0) expect_val(outputs[0], 2000, "feature output");
    expect_val(cycles, FEAT_INSTRS + stalls, "feature cycles");
    foreach (FEAT_EXPECT[i]) expect_val(dut.u_mem.mem[FEAT_BASE + i], FEAT_EXPECT[i], $sformatf("feature word %0d", FEAT_BASE + i));

    // gcd program
    for (int k = 0; k < 24; k++) begin
      case (k)
        0: begin a = 0;   b = 13;  end
        1: begin a = 48;  b = 18;  end
        2: begin a = 7;   b = 7;   end
        3: begin a = 1;   b = 300; end
        default: begin a = $urandom_range(0, 200); b = $urandom_range(0, 200); end
      endcase
      prog_gcd(p);
      inputs = {a, b};
      in_delay = k % 4;
      run(p, cycles);
      expect_val(halted, 1, "gcd halted");
      expect_val(outputs.size(), 1, "gcd output count");
      if (outputs.size() > 0) expect_val(outputs[0], gcd_ref(a, b), $sformatf("gcd(%0d,%0d)", a, b));
      expect_val(cycles, 7 + gcd_instrs(a, b) + stalls, $sformatf("gcd(%0d,%0d) cycles", a, b));
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %s happened %0d times", mech_e'(m), mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
