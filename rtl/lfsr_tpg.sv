// lfsr_tpg: hardware test pattern generator of the built-in self-test.
//
// A 32-bit Fibonacci linear-feedback shift register with the maximal-length
// polynomial x^32 + x^22 + x^2 + x + 1. `load` restarts the sequence at SEED,
// `en` advances it by one step per clock. The pattern register supplies both
// 16-bit multiplier operands (upper half: a, lower half: b). The design description
// names a hardware test pattern generator (pseudo-random generation is among
// the methods it lists); the LFSR length, polynomial and seed are this
// design's choices.
//
// Interface: clk, rst_n (asynchronous, loads SEED), load, en; pattern is the
// current register contents.
module lfsr_tpg #(
  parameter int unsigned W    = 32,
  parameter logic [W-1:0] SEED = 32'h1BAD_5EED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] pattern
);

  logic fb;

  // Taps for W = 32: bits 31, 21, 1, 0 (x^32, x^22, x^2, x^1).
  assign fb = pattern[W-1] ^ pattern[21] ^ pattern[1] ^ pattern[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pattern <= SEED;
    else if (load)  pattern <= SEED;
    else if (en)    pattern <= {pattern[W-2:0], fb};
  end

endmodule
