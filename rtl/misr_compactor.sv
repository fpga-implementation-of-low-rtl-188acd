// misr_compactor: output response compactor of the built-in self-test.
//
// A 40-bit multiple-input signature register: each enabled clock the register
// shifts left by one with feedback from the polynomial
// x^40 + x^38 + x^21 + x^19 + 1 and the 40 response bits are XORed in:
//     sig <= {sig[38:0], sig[39]^sig[37]^sig[20]^sig[18]} ^ d
// `clr` empties it before a test. The design description shows an output response
// compactor feeding the comparator; the MISR structure and polynomial are this
// design's choices.
//
// Interface: clk, rst_n (asynchronous clear), clr, en, d; sig is the
// signature.
module misr_compactor #(
  parameter int unsigned W = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  logic fb;

  // Taps for W = 40: bits 39, 37, 20, 18.
  assign fb = sig[W-1] ^ sig[37] ^ sig[20] ^ sig[18];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sig <= '0;
    else if (clr)  sig <= '0;
    else if (en)   sig <= {sig[W-2:0], fb} ^ d;
  end

endmodule
