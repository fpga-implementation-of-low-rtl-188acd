// razor_reg: a bank of Razor flip-flops (main flip-flop, shadow flip-flop,
// comparator and restore multiplexer), as used for the accumulator of the
// PTMAC.
//
// How it works. Each cycle in which `en` is high the main flip-flop captures
// the data path output at the clock edge and the shadow flip-flop captures the
// same node once it has settled. Under voltage overscaling the main flip-flop
// may capture a value that has not yet arrived; this design represents such a
// late arrival with the `late` input, which makes the main flip-flop keep its
// previous contents while the shadow flip-flop receives the settled value.
// The design description uses a shadow flip-flop rather than a shadow latch; that is
// followed here.
//
// Timing, following the four half-cycle phases of a Razor execution:
//   EP/AP  cycle k      : data launched and captured at the rising edge k+1
//   EDP    falling edge : main and shadow are compared and `err` is set
//   ECP    rising edge  : while `err` is high the main flip-flop is loaded
//                         from the shadow flip-flop (the restore multiplexer);
//                         `en` is ignored in that cycle
//   the comparison at the next falling edge clears `err` again.
// The owner must treat the cycle in which `err` is high as a stall: the
// operation presented during it is not captured and must be repeated.
// A value that misses even the shadow flip-flop (a system failure) and the
// metastability detector cannot be expressed at register-transfer level and
// are not modelled.
//
// Interface: clk, rst_n (asynchronous, active low, clears both flip-flops and
// the error flag), en, d, late; q is the main flip-flop, err the error flag.
module razor_reg #(
  parameter int unsigned W = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  input  logic         late,
  output logic [W-1:0] q,
  output logic         err
);

  logic [W-1:0] main_q;
  logic [W-1:0] shadow_q;
  logic         err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_q   <= '0;
      shadow_q <= '0;
    end else if (err_q) begin
      main_q <= shadow_q;              // error correction phase
    end else if (en) begin
      shadow_q <= d;
      if (!late) main_q <= d;
    end
  end

  // Error detection phase: compare half a cycle after the capture edge.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) err_q <= 1'b0;
    else        err_q <= (main_q != shadow_q);
  end

  // The correction phase always removes the mismatch, so an error never
  // lasts into a second detection phase.
  a_err_one_cycle: assert property (@(negedge clk) disable iff (!rst_n) err_q |=> !err_q)
    else $error("Razor error flag held for two detection phases");

  assign q   = main_q;
  assign err = err_q;

endmodule
