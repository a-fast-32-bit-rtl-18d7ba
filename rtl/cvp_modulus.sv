// cvp_modulus: modulus extraction stage of the CVP output path.
//
// Modes (cvp_pkg::mod_mode_e):
//   MOD_PASS    ZR = re, ZI = im
//   MOD_MODULUS ZR = |z| ~ 15/16*max(|re|,|im|) + 15/32*min(|re|,|im|), ZI = 0
//   MOD_ABS     ZR = |re|, ZI = |im|   (modulus of two real channels)
// The magnitude is the shift-and-add "alpha max plus beta min" estimate,
// within about 6 % of the true modulus, saturated to 2^31-1.
//
// Alongside the data it reports a 4-bit exponent for the gain monitor:
// e = min(15, max(0, L - 16)) where L is the bit length of the larger output
// component's magnitude. e = 0 means the output fits in 16 bits; each step up
// means one more bit of growth.
//
// The chip diagram names the block, its 32-bit outputs and its 4-bit output;
// the modulus algorithm, the modes and the exponent's definition are this
// design's choice. One register stage on both outputs.
module cvp_modulus
  import cvp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cplx_t     zin,
  input  mod_mode_e mode,
  output cplx_t     zout,
  output logic [EW-1:0] expo
);

  logic [DW:0]   ar, ai, mx, mn;
  logic [DW+4:0] mag;
  logic [DW-1:0] mag_sat, ar_sat, ai_sat;
  cplx_t         nz;
  logic [DW:0]   mr, mi, mm;
  int            len;
  logic [EW-1:0] ne;

  function automatic logic [DW:0] absval(input logic signed [DW-1:0] v);
    return v[DW-1] ? (DW+1)'(-(DW+1)'(v)) : (DW+1)'(v);
  endfunction

  function automatic logic [DW-1:0] sat_pos(input logic [DW+4:0] v);
    return (v > (DW+5)'(32'h7fff_ffff)) ? 32'h7fff_ffff : v[DW-1:0];
  endfunction

  always_comb begin
    ar  = absval(zin.re);
    ai  = absval(zin.im);
    mx  = (ar > ai) ? ar : ai;
    mn  = (ar > ai) ? ai : ar;
    mag = (((DW+5)'(mx) * 15) >> 4) + (((DW+5)'(mn) * 15) >> 5);
    mag_sat = sat_pos(mag);
    ar_sat  = sat_pos((DW+5)'(ar));
    ai_sat  = sat_pos((DW+5)'(ai));
    unique case (mode)
      MOD_MODULUS: begin nz.re = mag_sat; nz.im = '0;     end
      MOD_ABS:     begin nz.re = ar_sat;  nz.im = ai_sat; end
      default:     nz = zin;
    endcase
    // exponent of the value being output
    mr = absval(nz.re);
    mi = absval(nz.im);
    mm = (mr > mi) ? mr : mi;
    len = 0;
    for (int i = 0; i <= DW; i++) if (mm[i]) len = i + 1;
    if (len <= 16)      ne = '0;
    else if (len >= 31) ne = 4'd15;
    else                ne = EW'(len - 16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zout <= '0;
      expo <= '0;
    end else begin
      zout <= nz;
      expo <= ne;
    end
  end

endmodule
