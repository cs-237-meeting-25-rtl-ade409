// tepid_top: a complete TEPID computer.
//
// Connects the single-cycle core (tepid_core) to a unified word-addressed
// memory of 2^ADDR_W 32-bit words (tepid_mem) and to the software-interrupt
// unit (tepid_swi_unit) that gives programs a console input stream (swi #2),
// a console output stream (swi #4) and halt (swi #0).
//
// Program loading: while rst is high the core is held at PC 0 and the
// load_* port writes memory, one word per clock; when rst falls the core
// starts at word 0 with all registers and condition codes zero. (The stack
// pointer r13 therefore starts at 0, so the first push goes to the top
// word of memory.) The load port is this design's own.
module tepid_top
  import tepid_pkg::*;
#(
  parameter int unsigned ADDR_W = ADDR_BITS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [31:0]       load_data,
  input  logic              in_valid,
  input  logic [31:0]       in_data,
  output logic              in_ready,
  output logic              out_valid,
  output logic [31:0]       out_data,
  output logic              halted
);

  logic [ADDR_W-1:0] imem_addr, dmem_addr, mem_addr;
  logic [31:0]       imem_rdata, dmem_rdata, dmem_wdata, mem_wdata;
  logic              dmem_we, mem_we;
  logic              swi_req, swi_ack, swi_wr;
  logic [13:0]       swi_num;
  logic [31:0]       swi_arg, swi_rdata;

  tepid_core #(.ADDR_W(ADDR_W)) u_core (
    .clk       (clk),
    .rst       (rst),
    .imem_addr (imem_addr),
    .imem_rdata(imem_rdata),
    .dmem_addr (dmem_addr),
    .dmem_we   (dmem_we),
    .dmem_wdata(dmem_wdata),
    .dmem_rdata(dmem_rdata),
    .swi_req   (swi_req),
    .swi_num   (swi_num),
    .swi_arg   (swi_arg),
    .swi_ack   (swi_ack),
    .swi_wr    (swi_wr),
    .swi_rdata (swi_rdata),
    .halt      (halted)
  );

  assign mem_addr  = rst ? load_addr : dmem_addr;
  assign mem_we    = rst ? load_we   : dmem_we;
  assign mem_wdata = rst ? load_data : dmem_wdata;

  tepid_mem #(.ADDR_W(ADDR_W)) u_mem (
    .clk  (clk),
    .iaddr(imem_addr),
    .idata(imem_rdata),
    .daddr(mem_addr),
    .we   (mem_we),
    .wdata(mem_wdata),
    .rdata(dmem_rdata)
  );

  tepid_swi_unit u_swi (
    .clk      (clk),
    .rst      (rst),
    .swi_req  (swi_req),
    .swi_num  (swi_num),
    .swi_arg  (swi_arg),
    .swi_ack  (swi_ack),
    .swi_wr   (swi_wr),
    .swi_rdata(swi_rdata),
    .in_valid (in_valid),
    .in_data  (in_data),
    .in_ready (in_ready),
    .out_valid(out_valid),
    .out_data (out_data),
    .halted   (halted)
  );

endmodule
