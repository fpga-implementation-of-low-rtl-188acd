// barrel_shifter: logarithmic barrel shifter for the 40-bit accumulator.
//
// The design description names a barrel shifter attached to the accumulator but does
// not describe it; this is the simplest such unit: SHAMT_W stages, stage k
// shifting by 2^k when bit k of `amt` is set. `left` selects a left shift
// (zeros shifted in); otherwise it is an arithmetic right shift (sign bit
// shifted in). Shift amounts of W or more give all zeros (left) or all sign
// bits (right).
//
// Interface: purely combinational; din, amt, left in, dout out.
module barrel_shifter #(
  parameter int unsigned W       = 40,
  parameter int unsigned SHAMT_W = 6
) (
  input  logic [W-1:0]       din,
  input  logic [SHAMT_W-1:0] amt,
  input  logic               left,
  output logic [W-1:0]       dout
);

  logic [W-1:0] stage [SHAMT_W+1];

  always_comb begin
    stage[0] = din;
    for (int k = 0; k < int'(SHAMT_W); k++) begin
      if (!amt[k]) begin
        stage[k+1] = stage[k];
      end else if ((1 << k) >= int'(W)) begin
        stage[k+1] = left ? '0 : {W{stage[k][W-1]}};
      end else if (left) begin
        stage[k+1] = stage[k] << (1 << k);
      end else begin
        stage[k+1] = W'($signed(stage[k]) >>> (1 << k));
      end
    end
    dout = stage[SHAMT_W];
  end

endmodule
