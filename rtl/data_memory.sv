// data_memory: the 16-bit data memory of the PTMAC (Harvard data side).
//
// Single-port synchronous RAM: the address is presented in the Execute stage,
// a write happens at the rising edge when `we` is high, and read data appear
// after that edge for the Write stage. The 16-bit word follows the block
// diagram; the depth (DEPTH, 256 words) is this design's choice, since the
// description gives none. Contents start at zero.
//
// Interface: clk, we, addr, wdata, rdata (registered).
module data_memory #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
