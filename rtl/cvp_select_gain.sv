// cvp_select_gain: selection and gain control of the CVP output path.
//
// Picks one of the four 40-bit complex accumulators (sel: 0 W, 1 X, 2 Y,
// 3 Z), shifts both components right arithmetically by `shift` (0 to 15
// places, truncating) and saturates the result to the 32-bit output bus
// width. With fractional data the accumulator's low 32 bits line up with the
// output, so shift 0 passes an in-range value unchanged and a shift of k
// divides by 2^k, the scaling step of block floating point.
//
// The chip diagram only names this block; the shift-and-saturate scheme and
// the field widths are this design's choice. One register stage: the value
// chosen in cycle n is on `z` after the rising edge that ends cycle n.
module cvp_select_gain
  import cvp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  acc_t       acc [NACC],
  input  logic [1:0] sel,
  input  logic [3:0] shift,
  output cplx_t      z
);

  acc_t                 chosen;
  logic signed [AW-1:0] shr, shi;
  logic signed [63:0]   satr, sati;

  always_comb begin
    chosen = acc[sel];
    shr    = chosen.re >>> shift;
    shi    = chosen.im >>> shift;
    satr   = sat_to(128'(shr), DW);
    sati   = sat_to(128'(shi), DW);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z <= '0;
    else begin
      z.re <= satr[DW-1:0];
      z.im <= sati[DW-1:0];
    end
  end

endmodule
