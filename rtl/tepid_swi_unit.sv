// tepid_swi_unit: software-interrupt service unit of a TEPID machine.
//
// A TEPID program reaches the outside world with swi #n. This unit gives
// the three services the example programs use: swi #2 reads the next word
// of a console input stream into r0, swi #4 writes r0 to a console output
// stream, and swi #0 halts the machine. Any other number completes with no
// effect. The service numbers follow the architecture's example program;
// the handshake is this design's own.
//
// Timing: the core holds swi_req while the swi executes; the unit answers
// in the same cycle with swi_ack. swi #2 waits (swi_ack low, the core
// stalls) until in_valid; in the acknowledging cycle in_ready pulses and
// swi_wr/swi_rdata tell the core to load in_data into r0. swi #4 pulses
// out_valid with out_data = r0. swi #0 sets the sticky halted output on the
// next clock edge.
module tepid_swi_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        swi_req,
  input  logic [13:0] swi_num,
  input  logic [31:0] swi_arg,
  output logic        swi_ack,
  output logic        swi_wr,
  output logic [31:0] swi_rdata,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        halted
);

  localparam logic [13:0] SWI_HALT  = 14'd0;
  localparam logic [13:0] SWI_READ  = 14'd2;
  localparam logic [13:0] SWI_WRITE = 14'd4;

  always_comb begin
    swi_ack   = 1'b0;
    swi_wr    = 1'b0;
    swi_rdata = in_data;
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = swi_arg;
    if (swi_req) begin
      unique case (swi_num)
        SWI_READ: begin
          swi_ack  = in_valid;
          swi_wr   = in_valid;
          in_ready = in_valid;
        end
        SWI_WRITE: begin
          swi_ack   = 1'b1;
          out_valid = 1'b1;
        end
        default: swi_ack = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                                halted <= 1'b0;
    else if (swi_req && swi_num == SWI_HALT) halted <= 1'b1;
  end

endmodule
