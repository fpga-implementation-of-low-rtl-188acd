// pt_multiplier: signed N x N programmable truncated multiplier.
//
// The partial-product matrix is the modified Baugh-Wooley array of two
// two's-complement operands: plain AND terms a[i]&b[j] for i,j < N-1, the
// inverted terms ~(a[N-1]&b[j]) and ~(a[i]&b[N-1]), the plain term
// a[N-1]&b[N-1] and the constants 2^N and 2^(2N-1). Programmable truncation
// switches off every partial-product bit whose column (i + j) is below
// `trunc`, as described for programmable truncated
// multiplication, and adds a constant compensation in place of the removed
// part. The compensation is the expected value of the removed bits when every
// one is an AND term of independent, uniform bits:
//     C(T) = ((T - 1) * 2^T + 1) / 4   (integer division), C(0) = 0.
// Bits of the result below column `trunc` are then cleared. With trunc = 0
// the product is exact. The Baugh-Wooley array, the compensation formula and
// clearing of the low columns are this design's choices; the design description gives
// only the principle (fixed-width structure, deactivated partial products,
// small compensation circuit).
//
// Interface: purely combinational. a, b are signed operands, trunc is the
// number of low columns removed (0 .. 2N-1), p is the signed 2N-bit product.
module pt_multiplier #(
  parameter int unsigned N       = 16,
  parameter int unsigned TRUNC_W = 5
) (
  input  logic [N-1:0]       a,
  input  logic [N-1:0]       b,
  input  logic [TRUNC_W-1:0] trunc,
  output logic [2*N-1:0]     p
);

  localparam int unsigned PW = 2 * N;
  // Wide enough for the compensation constant of the largest trunc value.
  localparam int unsigned CW = PW + TRUNC_W + 2;

  logic [PW-1:0] sum;
  logic [CW-1:0] comp;
  logic [PW-1:0] low_mask;

  always_comb begin
    logic pp;
    sum = PW'(1) << N;
    sum = sum + (PW'(1) << (PW - 1));
    for (int i = 0; i < int'(N); i++) begin
      for (int j = 0; j < int'(N); j++) begin
        pp = a[i] & b[j];
        if ((i == int'(N) - 1) != (j == int'(N) - 1)) pp = ~pp;
        if ((i + j) >= int'(trunc)) sum = sum + (PW'(pp) << (i + j));
      end
    end
  end

  always_comb begin
    if (trunc == '0) comp = '0;
    else comp = ((CW'(trunc) - CW'(1)) << trunc) + CW'(1) >> 2;
    low_mask = ~((PW'(1) << trunc) - PW'(1));
  end

  assign p = (sum + comp[PW-1:0]) & low_mask;

endmodule
