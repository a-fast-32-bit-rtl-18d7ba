// cvp_prog_pkg: testbench helpers for the CVP boards.
//
// Builds micro-code for the single-node board and computes the expected
// results from the arithmetic definitions, independently of the RTL.
// CVP timing used by the generators (data presented in cycle n):
// accumulator k operation in cycle n+4+k, selection in cycle m reads the
// accumulators of cycle m+1 and the result is on ZR/ZI in cycle m+3.
package cvp_prog_pkg;
  import cvp_pkg::*;
  import cvp_node_pkg::*;

  typedef uword_t prog_t [$];

  function automatic uword_t nop();
    uword_t w;
    w = '0;
    for (int k = 0; k < NACC; k++) w.acc_op[k] = ACC_HOLD;
    return w;
  endfunction

  function automatic void grow(ref prog_t p, input int len);
    while (p.size() < len) p.push_back(nop());
  endfunction

  // Q1.31 complex product, truncated after the exact sum
  function automatic void cmulq(input longint xr, xi, wr, wi, output longint yr, yi);
    yr = (xr * wr - xi * wi) >>> 31;
    yi = (xr * wi + xi * wr) >>> 31;
  endfunction

  function automatic longint shsat(input longint v, input int sh);
    longint x;
    x = v >>> sh;
    if (x > 64'sd2147483647) x = 64'sd2147483647;
    if (x < -64'sd2147483648) x = -64'sd2147483648;
    return x;
  endfunction

  function automatic longint modulus(input longint r, input longint i);
    longint ar, ai, mx, mn, m;
    ar = r < 0 ? -r : r; ai = i < 0 ? -i : i;
    mx = ar > ai ? ar : ai; mn = ar > ai ? ai : ar;
    m = (mx * 15) / 16 + (mn * 15) / 32;
    return m > 2147483647 ? 2147483647 : m;
  endfunction

  function automatic int expo_of(input longint r, input longint m);
    longint mm;
    int len;
    mm = (r < 0 ? -r : r) > (m < 0 ? -m : m) ? (r < 0 ? -r : r) : (m < 0 ? -m : m);
    len = 0;
    while (mm > 0) begin len++; mm = mm >> 1; end
    return len <= 16 ? 0 : (len - 16 > 15 ? 15 : len - 16);
  endfunction

  // Process "weight": each of n input words times coefficient (wr, wi),
  // output either the product or its modulus.
  function automatic prog_t prog_weight(input int n, input longint wr, wi, input bit modulus_out);
    prog_t p;
    grow(p, n + 9);
    for (int i = 0; i < n; i++) begin
      p[i].src = SRC_INQ; p[i].iq_pop = 1'b1;
      p[i].coef_re = 32'(wr); p[i].coef_im = 32'(wi);
      p[i + 4].acc_op[0] = ACC_LOAD;
      p[i + 5].modc.sel = 2'd0;
      p[i + 5].modc.mode = modulus_out ? MOD_MODULUS : MOD_PASS;
      p[i + 5].modc.gm_en = 1'b1;
      p[i + 5].modc.gm_clr = (i == 0);
      p[i + 8].oq_push = 1'b1;
    end
    p[n + 8].last = 1'b1;
    return p;
  endfunction

  // operation adding (-j)^(q*k) * t; the first term loads
  function automatic acc_op_e bfly_op(input int q, input int k);
    case ((q * k) % 4)
      0: return q == 0 ? ACC_LOAD : ACC_ADD;
      1: return q == 0 ? ACC_NEGJ : ACC_SUBJ;
      2: return q == 0 ? ACC_NEG  : ACC_SUB;
      default: return q == 0 ? ACC_LOADJ : ACC_ADDJ;
    endcase
  endfunction

  // Process "butterflies": nb*4 input words are first copied to scratch
  // (integer mode, coefficient 1), then read back as nb radix-4
  // butterflies with twiddles tw[q] (q = 0..3, the same for each
  // butterfly), outputs scaled by 2^-sh, four outputs per butterfly.
  function automatic prog_t prog_bfly(input int nb, input longint twr [4], twi [4], input int sh);
    prog_t p;
    int n, base;
    n = 4 * nb;
    base = n + 9;
    grow(p, base + n + 12);
    for (int i = 0; i < n; i++) begin
      p[i].src = SRC_INQ; p[i].iq_pop = 1'b1;
      p[i].coef_re = 32'sd1; p[i].coef_im = 32'sd0; p[i].mul.integer_mode = 1'b1;
      p[i + 4].acc_op[0] = ACC_LOAD;
      p[i + 5].modc.sel = 2'd0;
      p[i + 8].scr_we = 1'b1; p[i + 8].scr_waddr = MADDR_W'(i);
    end
    for (int bf = 0; bf < nb; bf++) begin
      for (int q = 0; q < 4; q++) begin
        int c;
        c = base + 4 * bf + q;
        p[c].src = SRC_SCRATCH; p[c].scr_raddr = MADDR_W'(4 * bf + q);
        p[c].coef_re = 32'(twr[q]); p[c].coef_im = 32'(twi[q]);
        for (int k = 0; k < 4; k++) p[c + 4 + k].acc_op[k] = bfly_op(q, k);
      end
      for (int k = 0; k < 4; k++) begin
        int m;
        m = base + 4 * bf + 8 + k;
        p[m].modc.sel = 2'(k); p[m].modc.shift = 4'(sh); p[m].modc.mode = MOD_PASS;
        p[m].modc.gm_en = 1'b1; p[m].modc.gm_clr = (bf == 0 && k == 0);
        p[m + 3].oq_push = 1'b1;
      end
    end
    p[base + n + 11].last = 1'b1;
    return p;
  endfunction

  // Expected butterfly outputs for one group of four inputs.
  function automatic void bfly_ref(input longint xr [4], xi [4], twr [4], twi [4], input int sh,
                                   output longint yr [4], yi [4]);
    longint tr [4], ti [4];
    for (int q = 0; q < 4; q++) cmulq(xr[q], xi[q], twr[q], twi[q], tr[q], ti[q]);
    for (int k = 0; k < 4; k++) begin
      longint sr, si;
      sr = 0; si = 0;
      for (int q = 0; q < 4; q++) begin
        case ((q * k) % 4)
          0: begin sr += tr[q]; si += ti[q]; end
          1: begin sr += ti[q]; si -= tr[q]; end
          2: begin sr -= tr[q]; si -= ti[q]; end
          default: begin sr -= ti[q]; si += tr[q]; end
        endcase
      end
      yr[k] = shsat(sr, sh); yi[k] = shsat(si, sh);
    end
  endfunction

endpackage
