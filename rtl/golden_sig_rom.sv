// golden_sig_rom: ROM of golden signatures for the built-in self-test.
//
// One entry per test pass. Each entry gives the truncation level applied to
// the programmable truncated multiplier during that pass and the 40-bit MISR
// signature a fault-free MAC unit produces for it. A signature is the MISR
// contents after N_PATTERNS = 256 patterns of lfsr_tpg (seed 32'h1BAD5EED):
// starting from a cleared accumulator and MISR, each pattern p gives
// acc <= acc + P(p[31:16], p[15:0], trunc) and the MISR absorbs the new acc.
// The design description shows a ROM holding the golden signature; the four truncation
// levels (0, 8, 12, 16 columns) and the table contents follow from this
// design's own test pattern generator, multiplier and compactor. The ROM is
// asynchronous (a constant table).
//
// Interface: addr selects the pass; trunc and sig are the entry.
module golden_sig_rom #(
  parameter int unsigned TRUNC_W   = 5,
  parameter int unsigned SIG_W     = 40,
  localparam int unsigned AW       = 2
) (
  input  logic [AW-1:0]      addr,
  output logic [TRUNC_W-1:0] trunc,
  output logic [SIG_W-1:0]   sig
);

  typedef struct packed {
    logic [TRUNC_W-1:0] trunc;
    logic [SIG_W-1:0]   sig;
  } entry_t;

  localparam entry_t TABLE [4] = '{
    '{trunc: TRUNC_W'(0),  sig: SIG_W'(40'h33CDC65AC0)},
    '{trunc: TRUNC_W'(8),  sig: SIG_W'(40'h15E62017C1)},
    '{trunc: TRUNC_W'(12), sig: SIG_W'(40'h9CF0982E3A)},
    '{trunc: TRUNC_W'(16), sig: SIG_W'(40'hC2AEDDCE5C)}
  };

  always_comb begin
    trunc = TABLE[addr].trunc;
    sig   = TABLE[addr].sig;
  end

endmodule
