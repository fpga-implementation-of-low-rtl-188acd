// razor_accumulator: the 40-bit adder and the fault-tolerant 40-bit
// accumulator of the PTMAC.
//
// The accumulator registers are Razor flip-flops (razor_reg), as the design description
// prescribes: static timing analysis places the only critical registers of
// the PTMAC in the accumulator, so only they are made Razor registers. The
// next value is chosen by `op`: load the product, add or subtract the
// sign-extended product (the 40-bit adder), clear, or load the barrel shifter
// output. The selection and the operation codes are this design's own.
//
// Timing: `op` and its operands are applied during the Execute cycle and the
// result is in `acc` after the next rising edge. When a late capture is
// detected, `err` is high for one cycle; during that cycle the accumulator is
// restored from its shadow flip-flops and the operation presented is ignored,
// so the owner must hold it and present it again (a one-cycle stall).
// `late` stands for a timing failure of the adder path under voltage
// overscaling (see razor_reg).
module razor_accumulator
  import ptmac_pkg::*;
#(
  parameter int unsigned AW = 40,
  parameter int unsigned PW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  acc_op_e       op,
  input  logic [PW-1:0] prod,
  input  logic [AW-1:0] shift_val,
  input  logic          late,
  output logic [AW-1:0] acc,
  output logic          err
);

  logic [AW-1:0] prod_x;
  logic [AW-1:0] next;

  assign prod_x = {{(AW - PW){prod[PW-1]}}, prod};

  always_comb begin
    unique case (op)
      ACC_LOAD: next = prod_x;
      ACC_ADD:  next = acc + prod_x;
      ACC_SUB:  next = acc - prod_x;
      ACC_CLR:  next = '0;
      ACC_SHFT: next = shift_val;
      default:  next = acc;
    endcase
  end

  razor_reg #(.W(AW)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (op != ACC_NOP),
    .d    (next),
    .late (late),
    .q    (acc),
    .err  (err)
  );

endmodule
