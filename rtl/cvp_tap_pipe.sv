// cvp_tap_pipe: the four-stage product pipeline of the CVP.
//
// The 33-bit complex product from the multiplier is passed down a chain of
// NSTAGE registers, one per clock. The output of every stage is brought out
// as a tap: tap[0] feeds accumulator W, tap[1] X, tap[2] Y and tap[3] Z, as
// on the chip diagram. Because each accumulator sees the same product stream
// one clock later than the one before it, four accumulators can build four
// different combinations of the same sequence of products (the four outputs
// of a radix-4 butterfly, for example) while the multiplier delivers one
// product per clock.
//
// Timing: a product on `din` in cycle n is on tap[k] after k+1 rising edges.
module cvp_tap_pipe
  import cvp_pkg::*;
#(
  parameter int NSTAGE = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  prod_t din,
  output prod_t tap [NSTAGE]
);

  prod_t stage_q [NSTAGE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSTAGE; i++) stage_q[i] <= '0;
    end else begin
      stage_q[0] <= din;
      for (int i = 1; i < NSTAGE; i++) stage_q[i] <= stage_q[i-1];
    end
  end

  always_comb begin
    for (int i = 0; i < NSTAGE; i++) tap[i] = stage_q[i];
  end

endmodule
