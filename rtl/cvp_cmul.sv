// cvp_cmul: the CVP complex multiplier.
//
// Every clock it accepts a complex data word (A = real, B = imaginary) and a
// complex coefficient (C = real, D = imaginary), all 32-bit two's complement,
// and delivers one complex product, or in dual channel real mode two
// independent real products (re = A*C, im = B*D). The result is 33 bits per
// component.
//
// Three pipeline stages, matching the three register ranks drawn inside the
// multiplier on the chip diagram: (1) the four 32x32 partial products,
// (2) their sum and difference (65 bits exact), (3) scaling to 33 bits with
// saturation. The controls travel with the data, so the mode applies to the
// operands it was presented with. Latency: the product of operands presented
// in cycle n appears on `p` after the third rising edge.
//
// Scaling is this design's choice: in fractional mode (Q1.31 operands) the
// exact product is shifted right by 31 (truncation) giving a Q2.31 result;
// in integer mode the exact product is kept. Both saturate to 33 bits, which
// only matters for (-1)*(-1) + (-1)*(-1) in fractional mode and for large
// integer operands.
module cvp_cmul
  import cvp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic signed [DW-1:0] c,
  input  logic signed [DW-1:0] d,
  input  mul_ctrl_t ctrl,
  output prod_t     p
);

  logic signed [2*DW-1:0] ac_q, bd_q, ad_q, bc_q;
  mul_ctrl_t              ctrl1_q, ctrl2_q;
  logic signed [2*DW:0]   sr_q, si_q;

  // Stage 1: partial products.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ac_q <= '0; bd_q <= '0; ad_q <= '0; bc_q <= '0; ctrl1_q <= '0;
    end else begin
      ac_q    <= a * c;
      bd_q    <= b * d;
      ad_q    <= a * d;
      bc_q    <= b * c;
      ctrl1_q <= ctrl;
    end
  end

  // Stage 2: combine.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q <= '0; si_q <= '0; ctrl2_q <= '0;
    end else begin
      if (ctrl1_q.dual_real) begin
        sr_q <= (2*DW+1)'(ac_q);
        si_q <= (2*DW+1)'(bd_q);
      end else begin
        sr_q <= (2*DW+1)'(ac_q) - (2*DW+1)'(bd_q);
        si_q <= (2*DW+1)'(ad_q) + (2*DW+1)'(bc_q);
      end
      ctrl2_q <= ctrl1_q;
    end
  end

  // Stage 3: scale and saturate.
  function automatic logic signed [PW-1:0] scale(input logic signed [2*DW:0] v, input logic int_mode);
    logic signed [127:0] w;
    logic signed [63:0]  s;
    w = 128'(v);
    if (!int_mode) w = w >>> (DW - 1);
    s = sat_to(w, PW);
    return s[PW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0;
    end else begin
      p.re <= scale(sr_q, ctrl2_q.integer_mode);
      p.im <= scale(si_q, ctrl2_q.integer_mode);
    end
  end

endmodule
