// program_memory: the 1024 x 32-bit instruction memory of the PTMAC.
//
// Simple dual-port synchronous RAM. The read port serves instruction fetch:
// the program counter is presented in the Fetch cycle and the instruction is
// available after the rising edge, for Decode. When `ren` is low the read
// register holds its word (used while the pipeline is stalled). The write
// port is used by the SPI loader. Size and word width follow the block
// diagram; the two-port organisation is this design's choice. Contents start
// at zero, which encodes NOP.
//
// Interface: clk; ren, raddr, rdata (registered); we, waddr, wdata.
module program_memory #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ren,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (ren) rdata <= mem[raddr];
  end

endmodule
