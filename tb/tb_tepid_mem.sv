// tb_tepid_mem: test of the word-addressed memory at a reduced size
// (2^12 words). Random writes through the data port are compared, through
// both read ports, with an associative-array model; a write takes effect at
// the clock edge and both reads are combinational.
module tb_tepid_mem;
  localparam int AW = 12;
  logic          clk = 0;
  logic [AW-1:0] iaddr, daddr;
  logic [31:0]   idata, rdata, wdata;
  logic          we;
  logic [31:0]   model [int];
  int            checks = 0, failures = 0;

  tepid_mem #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; iaddr = 0; daddr = 0; wdata = 0;
    // fill the whole memory so every later read has a known value
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 1; daddr = AW'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      we = 1'($urandom); daddr = AW'($urandom); wdata = $urandom; iaddr = AW'($urandom);
      #1;
      checks += 2;
      if (rdata !== model[int'(daddr)]) begin failures++; $display("FAIL rdata @%h", daddr); end
      if (idata !== model[int'(iaddr)]) begin failures++; $display("FAIL idata @%h", iaddr); end
      @(posedge clk);
      if (we) model[int'(daddr)] = wdata;
      #1;
      iaddr = daddr;
      #1;
      checks++;
      if (idata !== model[int'(daddr)]) begin failures++; $display("FAIL write-through @%h", daddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
