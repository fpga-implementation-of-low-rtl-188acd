// register_file: the general registers R0-R3 of the PTMAC, 16 bits each.
//
// Two combinational read ports serve the Read stage of the pipeline, one
// write port serves the Write stage. A read of the register being written in
// the same cycle returns the new value (write-through), so an instruction in
// Read needs no stall for a producer that is in Write. The number and width
// of the registers follow the block diagram; the port structure and the
// write-through are this design's choices.
//
// Interface: clk, rst_n (asynchronous, clears all registers); we, waddr,
// wdata written at the rising edge; raddr1/rdata1 and raddr2/rdata2 read.
module register_file #(
  parameter int unsigned W    = 16,
  parameter int unsigned NREG = 4,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr1,
  output logic [W-1:0]  rdata1,
  input  logic [AW-1:0] raddr2,
  output logic [W-1:0]  rdata2
);

  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (we && waddr == raddr1) ? wdata : regs[raddr1];
  assign rdata2 = (we && waddr == raddr2) ? wdata : regs[raddr2];

endmodule
