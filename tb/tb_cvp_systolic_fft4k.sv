// tb_cvp_systolic_fft4k: 4096-point windowed FFT with modulus on two
// cascaded systolic boards at their default sizes: an eight-stage pipeline
// of one input node, six radix-4 nodes and one output node.
//
// Board A: node 0 reads the input memory in base-4 digit-reversed order and
// multiplies by a Hann window; nodes 1-3 are radix-4 decimation-in-time
// stages 1-3. Board B: nodes 0-2 are stages 4-6 and node 3 is the output node,
// which passes each bin through the modulus unit. Each radix-4 node forms the
// four butterfly outputs in W, X, Y, Z at one product per clock and scales
// them by 1/4. Both boards run the same 4096 + 12 = 4108-word frame program
// length and swap banks together. The link between the boards (the copy of
// board A's output memory into board B's input memory, one word per clock
// during each frame period) is done here in the testbench. Every modulus is
// checked against a double-precision DFT of the windowed frame divided by
// 4096, within 7 % plus 48 LSB.
module tb_cvp_systolic_fft4k;
  import cvp_pkg::*;

  localparam int N = 4096, NST = 6, NF = 3;
  localparam int MDEPTH = 4096, MA = $clog2(MDEPTH), NNODE = 4;
  localparam int L = N + 12;
  localparam real PI = 3.14159265358979323846;
  localparam int SW = NNODE * (64 + $bits(mul_ctrl_t) + NACC * $bits(acc_op_e) +
                               $bits(mod_ctrl_t) + 2 * MA + 1) + 1;

  logic clk = 0, rst_n = 0;
  logic run, in_we, link_we, host_we_a, host_we_b, tick_a, tick_b;
  logic [MA-1:0] in_addr, out_addr;
  cplx_t in_data, link_data, out_data;
  logic [12:0] host_addr;
  logic [SW-1:0] host_data;
  logic [3:0] max_a [NNODE], max_b [NNODE];
  int checks = 0, failures = 0;

  // board A: input node and stages 1-3; board B: stages 4-6 and output node
  cvp_systolic board_a (
    .clk, .rst_n, .run, .in_we, .in_addr, .in_data,
    .out_addr(in_addr), .out_data(link_data),
    .host_we(host_we_a), .host_addr, .host_data, .frame_tick(tick_a), .max_o(max_a));
  cvp_systolic board_b (
    .clk, .rst_n, .run, .in_we(link_we), .in_addr, .in_data(link_data),
    .out_addr, .out_data,
    .host_we(host_we_b), .host_addr, .host_data, .frame_tick(tick_b), .max_o(max_b));

  always #5 clk = ~clk;
  initial begin
    repeat (L * (NF + 16)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic signed [31:0]  coef_re;
    logic signed [31:0]  coef_im;
    mul_ctrl_t           mul;
    acc_op_e [NACC-1:0]  acc_op;
    mod_ctrl_t           modc;
    logic [MA-1:0]       raddr;
    logic [MA-1:0]       waddr;
    logic                we;
  } snode_t;
  typedef struct packed {
    snode_t [NNODE-1:0] node;
    logic               last;
  } sword_t;

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

  function automatic real win(input int n);
    return real'(q31(0.5 - 0.5 * $cos(2.0 * PI * n / N))) / 2147483648.0;
  endfunction

  // adds (-j)^(q*m) * t; the first term loads
  function automatic acc_op_e bop(input int q, input int m);
    case ((q * m) % 4)
      0: return q == 0 ? ACC_LOAD : ACC_ADD;
      1: return q == 0 ? ACC_NEGJ : ACC_SUBJ;
      2: return q == 0 ? ACC_NEG  : ACC_SUB;
      default: return q == 0 ? ACC_LOADJ : ACC_ADDJ;
    endcase
  endfunction

  // node i of board b is pipeline stage g = 4b + i: 0 = input node,
  // 1-6 = radix-4 stages, 7 = output node
  task automatic load_program(input int b);
    sword_t p [L];
    for (int c = 0; c < L; c++) begin
      p[c] = '0;
      for (int i = 0; i < NNODE; i++) for (int k = 0; k < NACC; k++) p[c].node[i].acc_op[k] = ACC_HOLD;
    end
    for (int i = 0; i < NNODE; i++) begin
      int g;
      g = 4 * b + i;
      if (g == 0 || g == 7) begin
        for (int c = 0; c < N; c++) begin
          p[c].node[i].raddr = MA'(g == 0 ? digrev(c) : c);
          p[c].node[i].coef_re = 32'(g == 0 ? q31(win(digrev(c))) : 64'sd2147483647);
          p[c].node[i].coef_im = 0;
          p[c + 4].node[i].acc_op[0] = ACC_LOAD;
          p[c + 5].node[i].modc.sel = 2'd0;
          p[c + 5].node[i].modc.mode = g == 7 ? MOD_MODULUS : MOD_PASS;
          p[c + 8].node[i].we = 1'b1;
          p[c + 8].node[i].waddr = MA'(c);
        end
      end else begin
        int s, Lg, Q, o;
        s = g - 1; Lg = 4 ** (s + 1); Q = Lg / 4; o = 0;
        for (int k = 0; k < N; k += Lg) begin
          for (int j = 0; j < Q; j++) begin
            int c;
            c = 4 * o;
            for (int q = 0; q < 4; q++) begin
              real ang;
              ang = -2.0 * PI * real'(q * j) / real'(Lg);
              p[c + q].node[i].raddr = MA'(k + j + q * Q);
              p[c + q].node[i].coef_re = 32'(q31($cos(ang)));
              p[c + q].node[i].coef_im = 32'(q31($sin(ang)));
              for (int m = 0; m < 4; m++) p[c + q + 4 + m].node[i].acc_op[m] = bop(q, m);
            end
            for (int m = 0; m < 4; m++) begin
              p[c + 8 + m].node[i].modc.sel = 2'(m);
              p[c + 8 + m].node[i].modc.shift = 4'd2;
              p[c + 8 + m].node[i].modc.gm_en = 1'b1;
              p[c + 8 + m].node[i].modc.gm_clr = (o == 0 && m == 0);
              p[c + 11 + m].node[i].we = 1'b1;
              p[c + 11 + m].node[i].waddr = MA'(k + j + m * Q);
            end
            o++;
          end
        end
      end
    end
    p[L - 1].last = 1'b1;
    for (int c = 0; c < L; c++) begin
      host_we_a = (b == 0); host_we_b = (b == 1); host_addr = 13'(c); host_data = p[c];
      @(negedge clk);
    end
    host_we_a = 0; host_we_b = 0;
  endtask

  int n_ticks = 0, n_frames = 0;
  real ct [N], st [N];
  real maxerr = 0;

  initial begin
    longint fr [$][N], fi [$][N];
    int lat;
    run = 0; in_we = 0; link_we = 0; in_addr = 0; in_data = '0; out_addr = 0;
    host_we_a = 0; host_we_b = 0; host_addr = 0; host_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      ct[n] = $cos(-2.0 * PI * n / N); st[n] = $sin(-2.0 * PI * n / N);
    end
    load_program(0);
    load_program(1);
    lat = 2 * (NNODE + 1);
    run = 1;
    @(negedge clk);
    for (int p = 0; p < NF + lat; p++) begin
      longint nr [N], ni [N];
      real Xr [N], Xi [N];
      for (int n = 0; n < N; n++) begin
        nr[n] = q31(rnd(40000.0));
        ni[n] = q31(rnd(40000.0));
        if (p % 2 == 1) nr[n] += q31(0.3 * $cos(2.0 * PI * (5 + 7 * p) * n / N));
      end
      fr.push_back(nr); fi.push_back(ni);
      if (p >= lat) begin
        for (int k = 0; k < N; k++) begin
          real sr, si;
          sr = 0; si = 0;
          for (int n = 0; n < N; n++) begin
            real ar, ai;
            ar = real'(fr[p - lat][n]) * win(n); ai = real'(fi[p - lat][n]) * win(n);
            sr += ar * ct[(n * k) % N] - ai * st[(n * k) % N];
            si += ar * st[(n * k) % N] + ai * ct[(n * k) % N];
          end
          Xr[k] = sr / N; Xi[k] = si / N;
        end
      end
      for (int c = 0; c < L; c++) begin
        in_we = (c < N) && (p < NF);
        link_we = (c < N);
        in_addr = MA'(c);
        in_data.re = 32'(nr[c % N]); in_data.im = 32'(ni[c % N]);
        out_addr = MA'(c % N);
        #1;
        if (p >= lat && p - lat < NF && c < N) begin
          real er, ei, e;
          real mag;
          mag = $sqrt(Xr[c] * Xr[c] + Xi[c] * Xi[c]);
          er = real'(out_data.re) - mag; ei = real'(out_data.im);
          e = er < 0 ? -er : er;
          if (e / (mag + 1.0) > maxerr) maxerr = e / (mag + 1.0);
          checks++;
          if (e > 0.07 * mag + 48.0 || ei != 0) begin
            failures++;
            if (failures < 10) $display("frame %0d bin %0d: got %0d,%0d exp modulus of %0f,%0f", p - lat, c, out_data.re, out_data.im, Xr[c], Xi[c]);
          end
          if (c == N - 1) n_frames++;
        end
        checks++;
        if (tick_a !== (c == L - 1) || tick_b !== tick_a) failures++;
        if (tick_a) n_ticks++;
        @(negedge clk);
      end
    end
    checks++;
    if (n_frames != NF || n_ticks != NF + lat) failures++;
    $display("%0d frames of %0d points checked, one frame per %0d clocks, largest modulus error %0f of the bin",
             n_frames, N, L, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
