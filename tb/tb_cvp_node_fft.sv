// tb_cvp_node_fft: 1024-point complex FFT with window and modulus on the
// single-CVP node, at the node's default sizes.
//
// The micro-code is generated here. Pass 0 pops the 1024 input words,
// multiplies each by a Hann window coefficient and writes it to scratch
// bank 0 in base-4 digit-reversed order. Passes 1-5 are radix-4
// decimation-in-time stages. Each reads 256 groups of four words from one
// scratch bank, multiplies by the twiddles, forms the four butterfly outputs
// in accumulators W, X, Y, Z (section 1.2 of the README) scaled by 1/4, and
// writes them to the other bank. The last stage sends its outputs to the
// output queue instead, as moduli (tag 5) or as complex values (tag 6).
// Every output is compared with a double-precision DFT of the windowed
// input divided by 1024: complex values within 48 LSB, moduli within 7 %
// plus 48 LSB. The cycle count from dispatch to the last micro-word is
// reported and checked against 5 x (1024 + 12) + 1024 + 9 clocks.
module tb_cvp_node_fft;
  import cvp_pkg::*;
  import cvp_node_pkg::*;
  import cvp_prog_pkg::*;

  localparam int N = 1024, NST = 5;

  logic clk = 0, rst_n = 0;
  logic in_wr_en, in_full, out_rd_en, out_empty;
  cplx_t in_wr_data, out_rd_data;
  logic host_wcs_we, host_hash_we;
  logic [15:0] host_wcs_addr;
  uword_t host_wcs_data;
  logic [7:0] host_hash_addr;
  hash_entry_t host_hash_data;
  logic busy, wait_data, wait_space, done;
  logic [3:0] max_o;

  cvp_node dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digrev(input int n);
    int r;
    r = 0;
    for (int d = 0; d < NST; d++) begin r = (r << 2) | (n & 3); n = n >> 2; end
    return r;
  endfunction

  // uniform value in [-10000, 10000] / scale
  function automatic real rnd(input real scale);
    int v;
    v = int'($urandom % 20001);
    v = v - 10000;
    return real'(v) / scale;
  endfunction

  function automatic longint q31(input real v);
    real s;
    s = v * 2147483648.0;
    if (s > 2147483647.0) s = 2147483647.0;
    if (s < -2147483648.0) s = -2147483648.0;
    return longint'(s);
  endfunction

  localparam real PI = 3.14159265358979323846;
  int out_index [N];   // natural index of the i-th output word

  function automatic prog_t prog_fft(input bit modulus_out);
    prog_t p;
    int cur, base, src, dst;
    grow(p, N + 9 + NST * (N + 12));
    // pass 0: window and digit-reversed store
    for (int n = 0; n < N; n++) begin
      p[n].src = SRC_INQ; p[n].iq_pop = 1'b1;
      p[n].coef_re = 32'(q31(0.5 - 0.5 * $cos(2.0 * PI * n / N))); p[n].coef_im = 0;
      p[n + 4].acc_op[0] = ACC_LOAD;
      p[n + 5].modc.sel = 2'd0;
      p[n + 8].scr_we = 1'b1; p[n + 8].scr_waddr = MADDR_W'(digrev(n));
    end
    cur = N + 9;
    src = 0; dst = N;
    for (int s = 0; s < NST; s++) begin
      int L, Q, o;
      L = 4 ** (s + 1); Q = L / 4;
      base = cur; o = 0;
      for (int k = 0; k < N; k += L) begin
        for (int j = 0; j < Q; j++) begin
          int c;
          c = base + 4 * o;
          for (int q = 0; q < 4; q++) begin
            real ang;
            ang = -2.0 * PI * real'(q * j) / real'(L);
            p[c + q].src = SRC_SCRATCH; p[c + q].scr_raddr = MADDR_W'(src + k + j + q * Q);
            p[c + q].coef_re = 32'(q31($cos(ang))); p[c + q].coef_im = 32'(q31($sin(ang)));
            for (int m = 0; m < 4; m++) p[c + q + 4 + m].acc_op[m] = bfly_op(q, m);
          end
          for (int m = 0; m < 4; m++) begin
            p[c + 8 + m].modc.sel = 2'(m); p[c + 8 + m].modc.shift = 4'd2;
            p[c + 8 + m].modc.gm_en = 1'b1; p[c + 8 + m].modc.gm_clr = (o == 0 && m == 0);
            if (s == NST - 1) begin
              p[c + 8 + m].modc.mode = modulus_out ? MOD_MODULUS : MOD_PASS;
              p[c + 11 + m].oq_push = 1'b1;
              out_index[4 * o + m] = k + j + m * Q;
            end else begin
              p[c + 11 + m].scr_we = 1'b1; p[c + 11 + m].scr_waddr = MADDR_W'(dst + k + j + m * Q);
            end
          end
          o++;
        end
      end
      cur = base + N + 12;
      begin int t; t = src; src = dst; dst = t; end
    end
    p[cur - 1].last = 1'b1;
    return p;
  endfunction

  task automatic load_prog(input int addr, input prog_t p);
    for (int i = 0; i < p.size(); i++) begin
      host_wcs_we = 1; host_wcs_addr = 16'(addr + i); host_wcs_data = p[i];
      @(negedge clk);
    end
    host_wcs_we = 0;
  endtask

  task automatic load_hash(input int tag, input int start, input int otag);
    host_hash_we = 1; host_hash_addr = 8'(tag);
    host_hash_data.start = 16'(start); host_hash_data.in_words = 16'(N);
    host_hash_data.out_words = 16'(N); host_hash_data.out_tag = 8'(otag);
    @(negedge clk);
    host_hash_we = 0;
  endtask

  real xr [N], xi [N], Xr [N], Xi [N];
  int  t_start, t_end, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic run_one(input int tag, input bit modulus_out);
    cplx_t w, h;
    int nout;
    real maxerr;
    maxerr = 0;
    for (int n = 0; n < N; n++) begin
      xr[n] = rnd(80000.0);
      xi[n] = rnd(80000.0);
      if (n % 16 == 3) xr[n] += 0.1 * $cos(2.0 * PI * 37.0 * n / N);
    end
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        real ww, ang, ar, ai;
        ww = real'(q31(0.5 - 0.5 * $cos(2.0 * PI * n / N))) / 2147483648.0;
        ar = real'(q31(xr[n])) / 2147483648.0 * ww;
        ai = real'(q31(xi[n])) / 2147483648.0 * ww;
        ang = -2.0 * PI * real'((n * k) % N) / N;
        sr += ar * $cos(ang) - ai * $sin(ang);
        si += ar * $sin(ang) + ai * $cos(ang);
      end
      Xr[k] = sr / N * 2147483648.0; Xi[k] = si / N * 2147483648.0;
    end
    h.re = {24'h00_0000 | 24'($urandom), 8'(tag)}; h.im = 0;
    in_wr_en = 1; in_wr_data = h;
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      w.re = 32'(q31(xr[n])); w.im = 32'(q31(xi[n]));
      in_wr_data = w;
      @(negedge clk);
    end
    in_wr_en = 0;
    while (!busy) @(negedge clk);
    t_start = cyc;
    while (busy) @(negedge clk);
    t_end = cyc;
    // header
    checks++;
    if (out_empty || out_rd_data.re[7:0] != 8'(tag + 8'h10)) failures++;
    out_rd_en = 1; @(negedge clk); out_rd_en = 0;
    nout = 0;
    while (nout < N) begin
      real er, ei, got_r, got_i, err;
      int k;
      k = out_index[nout];
      got_r = real'(out_rd_data.re); got_i = real'(out_rd_data.im);
      checks++;
      if (modulus_out) begin
        real mag;
        mag = $sqrt(Xr[k] * Xr[k] + Xi[k] * Xi[k]);
        err = got_r - mag; if (err < 0) err = -err;
        if (err > 0.07 * mag + 48.0 || got_i != 0) failures++;
      end else begin
        er = got_r - Xr[k]; ei = got_i - Xi[k];
        err = $sqrt(er * er + ei * ei);
        if (err > maxerr) maxerr = err;
        if (err > 48.0) begin
          failures++;
          if (failures < 10) $display("bin %0d: got %0f,%0f exp %0f,%0f", k, got_r, got_i, Xr[k], Xi[k]);
        end
      end
      out_rd_en = 1; @(negedge clk); out_rd_en = 0;
      nout++;
    end
    $display("tag %0d (%s): %0d clocks from dispatch to end; largest complex error %0f LSB; MAX %0d",
             tag, modulus_out ? "modulus" : "complex", t_end - t_start, maxerr, max_o);
    checks++;
    if (t_end - t_start != N + 9 + NST * (N + 12)) failures++;
    checks++;
    if (!out_empty) failures++;
  endtask

  initial begin
    in_wr_en = 0; in_wr_data = '0; out_rd_en = 0;
    host_wcs_we = 0; host_wcs_addr = 0; host_wcs_data = '0;
    host_hash_we = 0; host_hash_addr = 0; host_hash_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_prog(0, prog_fft(0));
    load_prog(8192, prog_fft(1));
    load_hash(6, 0, 8'h16);
    load_hash(5, 8192, 8'h15);
    run_one(6, 0);
    run_one(5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
