// tb_cvp_systolic_fft: streaming 256-point windowed FFT on the systolic
// board, at the board's default sizes.
//
// Each of the four CVPs runs one radix-4 decimation-in-time stage
// (256 = 4^4). Node 0 reads its input memory in base-4 digit-reversed order.
// Its first-stage twiddles are all 1, so it multiplies by the Hann window
// instead. Nodes 1-3 multiply by the stage twiddles. Every node forms the
// four butterfly outputs in W, X, Y, Z (one product per clock, one output
// per clock), scales them by 1/4 and writes them to the next memory. The
// frame program is 64 x 4 + 12 = 268 words, so a new 256-point frame enters
// every 268 clocks. Frames are written into the input memory one per frame
// period and read five periods later from the output memory in natural
// order. Each bin is compared with a double-precision DFT of the windowed
// frame divided by 256, within 32 LSB.
module tb_cvp_systolic_fft;
  import cvp_pkg::*;

  localparam int N = 256, NST = 4, NF = 4;
  localparam int MDEPTH = 4096, MA = $clog2(MDEPTH), NNODE = 4;
  localparam int L = N + 12;
  localparam real PI = 3.14159265358979323846;
  localparam int SW = NNODE * (64 + $bits(mul_ctrl_t) + NACC * $bits(acc_op_e) +
                               $bits(mod_ctrl_t) + 2 * MA + 1) + 1;

  logic clk = 0, rst_n = 0;
  logic run, in_we, host_we, frame_tick;
  logic [MA-1:0] in_addr, out_addr;
  cplx_t in_data, out_data;
  logic [12:0] host_addr;
  logic [SW-1:0] host_data;
  logic [3:0] max_o [NNODE];
  int checks = 0, failures = 0;

  cvp_systolic dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (L * (NF + 8) + 2000) @(posedge clk);
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

  task automatic load_program();
    sword_t p [L];
    for (int c = 0; c < L; c++) begin
      p[c] = '0;
      for (int i = 0; i < NNODE; i++) for (int k = 0; k < NACC; k++) p[c].node[i].acc_op[k] = ACC_HOLD;
    end
    for (int s = 0; s < NST; s++) begin
      int Lg, Q, o;
      Lg = 4 ** (s + 1); Q = Lg / 4; o = 0;
      for (int k = 0; k < N; k += Lg) begin
        for (int j = 0; j < Q; j++) begin
          int c;
          c = 4 * o;
          for (int q = 0; q < 4; q++) begin
            int pos;
            real ang;
            pos = k + j + q * Q;
            ang = -2.0 * PI * real'(q * j) / real'(Lg);
            if (s == 0) begin
              p[c + q].node[s].raddr = MA'(digrev(pos));
              p[c + q].node[s].coef_re = 32'(q31(win(digrev(pos))));
              p[c + q].node[s].coef_im = 0;
            end else begin
              p[c + q].node[s].raddr = MA'(pos);
              p[c + q].node[s].coef_re = 32'(q31($cos(ang)));
              p[c + q].node[s].coef_im = 32'(q31($sin(ang)));
            end
            for (int m = 0; m < 4; m++) p[c + q + 4 + m].node[s].acc_op[m] = bop(q, m);
          end
          for (int m = 0; m < 4; m++) begin
            p[c + 8 + m].node[s].modc.sel = 2'(m);
            p[c + 8 + m].node[s].modc.shift = 4'd2;
            p[c + 8 + m].node[s].modc.gm_en = 1'b1;
            p[c + 8 + m].node[s].modc.gm_clr = (o == 0 && m == 0);
            p[c + 11 + m].node[s].we = 1'b1;
            p[c + 11 + m].node[s].waddr = MA'(k + j + m * Q);
          end
          o++;
        end
      end
    end
    p[L - 1].last = 1'b1;
    for (int c = 0; c < L; c++) begin
      host_we = 1; host_addr = 13'(c); host_data = p[c];
      @(negedge clk);
    end
    host_we = 0;
  endtask

  int n_ticks = 0, n_frames = 0;
  real maxerr = 0;

  initial begin
    longint fr [$][N], fi [$][N];
    int lat;
    run = 0; in_we = 0; in_addr = 0; in_data = '0; out_addr = 0;
    host_we = 0; host_addr = 0; host_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_program();
    lat = NNODE + 1;
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
            real ar, ai, ang;
            ar = real'(fr[p - lat][n]) * win(n); ai = real'(fi[p - lat][n]) * win(n);
            ang = -2.0 * PI * real'((n * k) % N) / N;
            sr += ar * $cos(ang) - ai * $sin(ang);
            si += ar * $sin(ang) + ai * $cos(ang);
          end
          Xr[k] = sr / N; Xi[k] = si / N;
        end
      end
      for (int c = 0; c < L; c++) begin
        in_we = (c < N) && (p < NF);
        in_addr = MA'(c);
        in_data.re = 32'(nr[c % N]); in_data.im = 32'(ni[c % N]);
        out_addr = MA'(c % N);
        #1;
        if (p >= lat && p - lat < NF && c < N) begin
          real er, ei, e;
          er = real'(out_data.re) - Xr[c]; ei = real'(out_data.im) - Xi[c];
          e = $sqrt(er * er + ei * ei);
          if (e > maxerr) maxerr = e;
          checks++;
          if (e > 32.0) begin
            failures++;
            if (failures < 10) $display("frame %0d bin %0d: got %0d,%0d exp %0f,%0f", p - lat, c, out_data.re, out_data.im, Xr[c], Xi[c]);
          end
          if (c == N - 1) n_frames++;
        end
        checks++;
        if (frame_tick !== (c == L - 1)) failures++;
        if (frame_tick) n_ticks++;
        @(negedge clk);
      end
    end
    checks++;
    if (n_frames != NF || n_ticks != NF + lat) failures++;
    $display("%0d frames of %0d points checked, one frame per %0d clocks, largest error %0f LSB",
             n_frames, N, L, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
