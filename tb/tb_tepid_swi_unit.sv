// tb_tepid_swi_unit: test of the software-interrupt unit: swi #2 waits for
// an input word and returns it for r0, swi #4 emits r0, swi #0 sets the
// sticky halt flag on the next edge, other numbers complete at once.
module tb_tepid_swi_unit;
  logic        clk = 0, rst = 1;
  logic        swi_req, swi_ack, swi_wr, in_valid, in_ready, out_valid, halted;
  logic [13:0] swi_num;
  logic [31:0] swi_arg, swi_rdata, in_data, out_data;
  int          checks = 0, failures = 0;

  tepid_swi_unit dut (.*);

  always #5 clk = ~clk;

  task automatic expect_val(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    swi_req = 0; swi_num = 0; swi_arg = 0; in_valid = 0; in_data = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    expect_val(32'(halted), 0, "halted after reset");
    // no request: nothing happens
    in_valid = 1; #1;
    expect_val({31'd0, swi_ack | in_ready | out_valid}, 0, "idle");
    in_valid = 0;
    // swi #2 without input: stalls
    swi_req = 1; swi_num = 2; in_data = 32'hdead_beef; #1;
    expect_val(32'(swi_ack), 0, "read waits");
    expect_val(32'(in_ready), 0, "read no ready");
    @(negedge clk); in_valid = 1; #1;
    expect_val(32'(swi_ack), 1, "read ack");
    expect_val(32'(swi_wr), 1, "read wr");
    expect_val(32'(in_ready), 1, "read ready");
    expect_val(swi_rdata, 32'hdead_beef, "read data");
    @(negedge clk); in_valid = 0;
    // swi #4
    swi_num = 4; swi_arg = 32'h1234_5678; #1;
    expect_val(32'(swi_ack), 1, "write ack");
    expect_val(32'(swi_wr), 0, "write no wr");
    expect_val(32'(out_valid), 1, "write valid");
    expect_val(out_data, 32'h1234_5678, "write data");
    // other service: completes with no effect
    @(negedge clk); swi_num = 7; #1;
    expect_val({30'd0, swi_ack, out_valid | swi_wr}, 32'd2, "other");
    @(posedge clk); #1;
    expect_val(32'(halted), 0, "not halted");
    // swi #0
    @(negedge clk); swi_num = 0; #1;
    expect_val(32'(swi_ack), 1, "halt ack");
    @(posedge clk); #1;
    expect_val(32'(halted), 1, "halted");
    swi_req = 0;
    @(posedge clk); #1;
    expect_val(32'(halted), 1, "halt sticky");
    rst = 1; @(posedge clk); #1;
    expect_val(32'(halted), 0, "reset clears halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
