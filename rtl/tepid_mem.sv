// tepid_mem: unified word-addressed main memory of a TEPID machine.
//
// TEPID memory is addressed in 32-bit words (word 1 follows word 0) with
// 24-bit addresses, so the full memory holds 2^24 words. One memory holds
// both program and data. It has a fetch port and a data port; both read
// combinationally, so the single-cycle core can fetch, execute and load in
// one clock. The data port writes on the rising clock edge. Word
// addressing and the 24-bit address follow the architecture; the two
// ports, the read timing and the lack of reset are this design's choices.
module tepid_mem #(
  parameter int unsigned ADDR_W = 24
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] iaddr,
  output logic [31:0]       idata,
  input  logic [ADDR_W-1:0] daddr,
  input  logic              we,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata
);

  logic [31:0] mem [2**ADDR_W];

  assign idata = mem[iaddr];
  assign rdata = mem[daddr];

  always_ff @(posedge clk) begin
    if (we) mem[daddr] <= wdata;
  end

endmodule
