// cvp_cacc: one 40-bit complex accumulator of the CVP (W, X, Y or Z).
//
// Each clock the accumulator register S is updated from its previous value s
// and the pipeline value t according to a 5-bit operation code: clear, hold,
// load, and load/add/subtract of t, j*t, conj(t) or j*conj(t), with negated
// loads (the full list is in cvp_pkg::acc_op_e). The register drives both the
// feedback into the adder and the selection block.
//
// The 33-bit input is sign-extended to 40 bits, so fractional products stay
// aligned with the accumulator's low bits and seven bits of headroom are left
// for growth. Overflow wraps modulo 2^40; this, the encoding of the
// operation codes and the reset to zero are this design's choices.
//
// Timing: the operation presented in cycle n acts on the t present in cycle n;
// the result is on `s` after the rising edge that ends cycle n.
module cvp_cacc
  import cvp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  acc_op_e op,
  input  prod_t   t,
  output acc_t    s
);

  logic signed [AW-1:0] tr, ti, nr, ni;

  always_comb begin
    tr = AW'(t.re);
    ti = AW'(t.im);
    unique case (op)
      ACC_HOLD:     begin nr = s.re;      ni = s.im;      end
      ACC_CLEAR:    begin nr = '0;        ni = '0;        end
      ACC_LOAD:     begin nr = tr;        ni = ti;        end
      ACC_LOADJ:    begin nr = -ti;       ni = tr;        end
      ACC_CONJ:     begin nr = tr;        ni = -ti;       end
      ACC_JCONJ:    begin nr = ti;        ni = tr;        end
      ACC_NEG:      begin nr = -tr;       ni = -ti;       end
      ACC_NEGJ:     begin nr = ti;        ni = -tr;       end
      ACC_NEGCONJ:  begin nr = -tr;       ni = ti;        end
      ACC_NEGJCONJ: begin nr = -ti;       ni = -tr;       end
      ACC_ADD:      begin nr = s.re + tr; ni = s.im + ti; end
      ACC_ADDJ:     begin nr = s.re - ti; ni = s.im + tr; end
      ACC_ADDCONJ:  begin nr = s.re + tr; ni = s.im - ti; end
      ACC_ADDJCONJ: begin nr = s.re + ti; ni = s.im + tr; end
      ACC_SUB:      begin nr = s.re - tr; ni = s.im - ti; end
      ACC_SUBJ:     begin nr = s.re + ti; ni = s.im - tr; end
      ACC_SUBCONJ:  begin nr = s.re - tr; ni = s.im + ti; end
      ACC_SUBJCONJ: begin nr = s.re - ti; ni = s.im - tr; end
      default:      begin nr = s.re;      ni = s.im;      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else begin
      s.re <= nr;
      s.im <= ni;
    end
  end

endmodule
