// cvp: the Complex Vector Processor device.
//
// A fully ported, pipelined complex multiply-accumulate engine. Four 32-bit
// input busses carry a complex data word (A real, B imaginary) and a complex
// coefficient (C real, D imaginary); two 32-bit output busses (ZR, ZI) carry
// results. Every clock the complex multiplier forms one complex product (or
// two real products), which runs down a four-stage pipeline. Each stage
// feeds one of four 40-bit complex accumulators W, X, Y, Z, each with its own
// operation code per clock (clear, hold, load, add, subtract of t, j*t,
// conj(t), j*conj(t) and negations). A selection and gain stage takes one
// accumulator per clock, scales it to 32 bits, and the modulus stage passes
// it or replaces it by its modulus. A gain monitor keeps the largest
// exponent seen, for block floating point (MAX).
//
// All inputs, controls included, are registered at the pins, as on the chip
// diagram. Controls are horizontal: each group acts on its unit in the clock
// after it is registered, so a program schedules them against the pipeline
// latency. With data and coefficients presented in cycle n:
//   product on tap k (k = 0 W, 1 X, 2 Y, 3 Z) during cycle n+5+k;
//   the accumulator k operation must be presented in cycle n+4+k;
//   its result is in the accumulator from cycle n+6+k;
//   a selection presented in cycle m reads the accumulators of cycle m+1 and
//   the result is on ZR/ZI in cycle m+3; MAX includes it in cycle m+4.
// ZR and ZI are tri-state on the device with active-low enables ENRB and
// ENIB; here the data and an active-high output enable are brought out
// separately. The test logic controls are not modelled.
//
// Widths, the number of pipeline stages and accumulators, and the register
// placement follow the chip diagram; the control encodings, the rounding
// and saturation rules and the exact latencies are this design's choices.
module cvp
  import cvp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic signed [DW-1:0] c,
  input  logic signed [DW-1:0] d,
  input  mul_ctrl_t       mul_ctrl,
  input  acc_op_e         acc_op [NACC],
  input  mod_ctrl_t       mod_ctrl,
  input  logic            enrb,
  input  logic            enib,
  output logic signed [DW-1:0] zr,
  output logic signed [DW-1:0] zi,
  output logic            zr_oe,
  output logic            zi_oe,
  output logic [EW-1:0]   max_o
);

  // Pin registers.
  logic signed [DW-1:0] a_q, b_q, c_q, d_q;
  mul_ctrl_t            mul_q;
  acc_op_e              op_q [NACC];
  mod_ctrl_t            mod_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; c_q <= '0; d_q <= '0;
      mul_q <= '0;
      mod_q <= '0;
      for (int k = 0; k < NACC; k++) op_q[k] <= ACC_HOLD;
    end else begin
      a_q <= a; b_q <= b; c_q <= c; d_q <= d;
      mul_q <= mul_ctrl;
      mod_q <= mod_ctrl;
      for (int k = 0; k < NACC; k++) op_q[k] <= acc_op[k];
    end
  end

  prod_t p;
  prod_t tap [NACC];
  acc_t  acc [NACC];

  cvp_cmul u_mul (
    .clk, .rst_n, .a(a_q), .b(b_q), .c(c_q), .d(d_q), .ctrl(mul_q), .p
  );

  cvp_tap_pipe #(.NSTAGE(NACC)) u_pipe (.clk, .rst_n, .din(p), .tap);

  for (genvar k = 0; k < NACC; k++) begin : g_acc
    cvp_cacc u_acc (.clk, .rst_n, .op(op_q[k]), .t(tap[k]), .s(acc[k]));
  end

  // Output path.
  cplx_t     zsel, zmod;
  mod_mode_e mode_q;
  logic      gm_en_q, gm_clr_q, gm_en_qq, gm_clr_qq;
  logic [EW-1:0] expo;

  cvp_select_gain u_sel (
    .clk, .rst_n, .acc, .sel(mod_q.sel), .shift(mod_q.shift), .z(zsel)
  );

  // Align the later controls with the data they act on.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MOD_PASS;
      gm_en_q <= 1'b0; gm_clr_q <= 1'b0; gm_en_qq <= 1'b0; gm_clr_qq <= 1'b0;
    end else begin
      mode_q    <= mod_q.mode;
      gm_en_q   <= mod_q.gm_en;
      gm_clr_q  <= mod_q.gm_clr;
      gm_en_qq  <= gm_en_q;
      gm_clr_qq <= gm_clr_q;
    end
  end

  cvp_modulus u_mod (.clk, .rst_n, .zin(zsel), .mode(mode_q), .zout(zmod), .expo);

  cvp_gain_monitor u_gm (
    .clk, .rst_n, .expo, .en(gm_en_qq), .clr(gm_clr_qq), .max_o
  );

  assign zr    = zmod.re;
  assign zi    = zmod.im;
  assign zr_oe = ~enrb;
  assign zi_oe = ~enib;

endmodule
