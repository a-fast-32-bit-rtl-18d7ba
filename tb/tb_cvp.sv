// tb_cvp: self-checking test of the CVP device.
//
// Part 1 streams NB radix-4 FFT butterflies through the device at one
// complex multiply per clock. Product q of a butterfly (x_q times twiddle
// w_q) reaches accumulator k one clock after it reaches accumulator k-1, and
// accumulator k forms y_k = sum_q (-j)^(q*k) * x_q*w_q with load/add/subj/
// sub/addj style operations. One accumulator completes every clock and is
// read out through selection (shift 2) in that clock, so the four outputs of
// each butterfly leave on ZR/ZI in four consecutive clocks: the rate must be
// one output per clock, with the latency documented in the cvp header.
// Part 2 accumulates an 8-term complex dot product in W and reads its
// modulus. Part 3 uses dual real mode with the channel-absolute output.
// Part 4 is a radix-2 butterfly: a (times 1) and w*b enter on consecutive
// clocks, X loads then adds them and Z loads then subtracts them.
// The gain monitor's MAX is checked against the largest exponent of the
// enabled outputs. Expected values are computed here from the arithmetic
// definitions (Q1.31 products truncated, 40-bit sums, shift, saturation).
module tb_cvp;
  import cvp_pkg::*;

  localparam int NB = 16;
  localparam int NCYC = 4 * NB + 80;

  logic clk = 0, rst_n = 0;
  logic signed [31:0] a, b, c, d, zr, zi;
  mul_ctrl_t mul_ctrl;
  acc_op_e acc_op [4];
  mod_ctrl_t mod_ctrl;
  logic enrb, enib, zr_oe, zi_oe;
  logic [3:0] max_o;
  int checks = 0, failures = 0;

  cvp dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Program, one entry per cycle.
  logic signed [31:0] pa [NCYC], pb [NCYC], pc [NCYC], pd [NCYC];
  mul_ctrl_t pmul [NCYC];
  acc_op_e   pop  [NCYC][4];
  mod_ctrl_t pmod [NCYC];
  // Expected output, by cycle.
  longint    er [NCYC], ei [NCYC];
  bit        ev [NCYC];
  int        exp_max;

  function automatic longint shsat(input longint v, input int sh);
    longint x;
    x = v >>> sh;
    if (x > 64'sd2147483647) x = 64'sd2147483647;
    if (x < -64'sd2147483648) x = -64'sd2147483648;
    return x;
  endfunction

  function automatic int expo_of(input longint r, input longint m);
    longint mm;
    int len;
    mm = (r < 0 ? -r : r) > (m < 0 ? -m : m) ? (r < 0 ? -r : r) : (m < 0 ? -m : m);
    len = 0;
    while (mm > 0) begin len++; mm = mm >> 1; end
    return len <= 16 ? 0 : (len - 16 > 15 ? 15 : len - 16);
  endfunction

  // operation for adding (-j)^(q*k) * t ; first term loads
  function automatic acc_op_e bfly_op(input int q, input int k);
    case ((q * k) % 4)
      0: return q == 0 ? ACC_LOAD : ACC_ADD;
      1: return q == 0 ? ACC_NEGJ : ACC_SUBJ;
      2: return q == 0 ? ACC_NEG  : ACC_SUB;
      default: return q == 0 ? ACC_LOADJ : ACC_ADDJ;
    endcase
  endfunction

  int out_count, first_out, last_out;
  localparam int SH = 2;

  initial begin
    longint tr [4], ti [4], yr, yi, xr, xi, wr, wi;
    int n, m;
    for (int i = 0; i < NCYC; i++) begin
      pa[i] = 0; pb[i] = 0; pc[i] = 0; pd[i] = 0; pmul[i] = '0; pmod[i] = '0;
      for (int k = 0; k < 4; k++) pop[i][k] = ACC_HOLD;
      ev[i] = 0; er[i] = 0; ei[i] = 0;
    end
    exp_max = 0;
    // ---- part 1: butterflies
    for (int bf = 0; bf < NB; bf++) begin
      for (int q = 0; q < 4; q++) begin
        n = 4 * bf + q;
        xr = longint'(signed'($urandom)) >>> 1; xi = longint'(signed'($urandom)) >>> 1;
        if (bf == 3) begin xr = xr >>> 12; xi = xi >>> 12; end
        wr = q == 0 ? 64'sd2147483647 : longint'(signed'($urandom));
        wi = q == 0 ? 0 : longint'(signed'($urandom));
        pa[n] = 32'(xr); pb[n] = 32'(xi); pc[n] = 32'(wr); pd[n] = 32'(wi);
        // Q1.31 product, truncated after the exact sum
        tr[q] = (xr * wr - xi * wi) >>> 31;
        ti[q] = (xr * wi + xi * wr) >>> 31;
        for (int k = 0; k < 4; k++) pop[n + 4 + k][k] = bfly_op(q, k);
      end
      for (int k = 0; k < 4; k++) begin
        yr = 0; yi = 0;
        for (int q = 0; q < 4; q++) begin
          case ((q * k) % 4)
            0: begin yr += tr[q]; yi += ti[q]; end
            1: begin yr += ti[q]; yi -= tr[q]; end   // -j*t
            2: begin yr -= tr[q]; yi -= ti[q]; end
            default: begin yr -= ti[q]; yi += tr[q]; end // +j*t
          endcase
        end
        m = 4 * bf + 8 + k;
        pmod[m].sel = 2'(k); pmod[m].shift = 4'(SH); pmod[m].mode = MOD_PASS;
        pmod[m].gm_en = 1'b1; pmod[m].gm_clr = (bf == 0 && k == 0);
        er[m + 3] = shsat(yr, SH); ei[m + 3] = shsat(yi, SH); ev[m + 3] = 1;
        if (expo_of(er[m + 3], ei[m + 3]) > exp_max) exp_max = expo_of(er[m + 3], ei[m + 3]);
      end
    end
    // ---- part 2: 8-term dot product in W, modulus output
    begin
      int base;
      base = 4 * NB + 10;
      yr = 0; yi = 0;
      for (int q = 0; q < 8; q++) begin
        n = base + q;
        xr = longint'(signed'($urandom)) >>> 4; xi = longint'(signed'($urandom)) >>> 4;
        wr = longint'(signed'($urandom)) >>> 1; wi = longint'(signed'($urandom)) >>> 1;
        pa[n] = 32'(xr); pb[n] = 32'(xi); pc[n] = 32'(wr); pd[n] = 32'(wi);
        yr += (xr * wr - xi * wi) >>> 31;
        yi += (xr * wi + xi * wr) >>> 31;
        pop[n + 4][0] = q == 0 ? ACC_LOAD : ACC_ADD;
      end
      m = base + 7 + 5;
      pmod[m].sel = 2'd0; pmod[m].shift = 0; pmod[m].mode = MOD_MODULUS;
      begin
        longint ar, ai, mx, mn;
        ar = shsat(yr, 0); ai = shsat(yi, 0);
        ar = ar < 0 ? -ar : ar; ai = ai < 0 ? -ai : ai;
        mx = ar > ai ? ar : ai; mn = ar > ai ? ai : ar;
        er[m + 3] = (mx * 15) / 16 + (mn * 15) / 32;
        if (er[m + 3] > 2147483647) er[m + 3] = 2147483647;
        ei[m + 3] = 0; ev[m + 3] = 1;
      end
      // ---- part 3: dual real product in Y, channel absolute values
      n = base + 20;
      xr = -64'sd123456789; xi = 64'sd987654321; wr = 64'sd1500000000; wi = -64'sd1900000000;
      pa[n] = 32'(xr); pb[n] = 32'(xi); pc[n] = 32'(wr); pd[n] = 32'(wi);
      pmul[n].dual_real = 1'b1;
      pop[n + 6][2] = ACC_LOAD;
      m = n + 7;
      pmod[m].sel = 2'd2; pmod[m].mode = MOD_ABS;
      er[m + 3] = (xr * wr) >>> 31; ei[m + 3] = (xi * wi) >>> 31;
      er[m + 3] = er[m + 3] < 0 ? -er[m + 3] : er[m + 3];
      ei[m + 3] = ei[m + 3] < 0 ? -ei[m + 3] : ei[m + 3];
      ev[m + 3] = 1;
      // ---- part 4: radix-2 butterfly, A = a + w*b in X, B = a - w*b in Z
      n = base + 30;
      begin
        longint ur, ui, vr, vi;
        xr = longint'(signed'($urandom)) >>> 1; xi = longint'(signed'($urandom)) >>> 1;
        pa[n] = 32'(xr); pb[n] = 32'(xi); pc[n] = 32'sh7fffffff; pd[n] = 0;
        ur = (xr * 64'sd2147483647) >>> 31; ui = (xi * 64'sd2147483647) >>> 31;
        xr = longint'(signed'($urandom)) >>> 1; xi = longint'(signed'($urandom)) >>> 1;
        wr = longint'(signed'($urandom)); wi = longint'(signed'($urandom));
        pa[n + 1] = 32'(xr); pb[n + 1] = 32'(xi); pc[n + 1] = 32'(wr); pd[n + 1] = 32'(wi);
        vr = (xr * wr - xi * wi) >>> 31; vi = (xr * wi + xi * wr) >>> 31;
        pop[n + 5][1] = ACC_LOAD; pop[n + 6][1] = ACC_ADD;
        pop[n + 7][3] = ACC_LOAD; pop[n + 8][3] = ACC_SUB;
        pmod[n + 7].sel = 2'd1; pmod[n + 7].shift = 4'd1;
        pmod[n + 9].sel = 2'd3; pmod[n + 9].shift = 4'd1;
        er[n + 10] = shsat(ur + vr, 1); ei[n + 10] = shsat(ui + vi, 1); ev[n + 10] = 1;
        er[n + 12] = shsat(ur - vr, 1); ei[n + 12] = shsat(ui - vi, 1); ev[n + 12] = 1;
      end
    end

    // ---- run
    a = 0; b = 0; c = 0; d = 0; mul_ctrl = '0; mod_ctrl = '0;
    for (int k = 0; k < 4; k++) acc_op[k] = ACC_CLEAR;
    enrb = 1; enib = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    out_count = 0; first_out = -1; last_out = -1;
    for (int i = 0; i < NCYC; i++) begin
      // cycle i: drive the program, then check the output of this cycle
      a = pa[i]; b = pb[i]; c = pc[i]; d = pd[i]; mul_ctrl = pmul[i];
      for (int k = 0; k < 4; k++) acc_op[k] = pop[i][k];
      mod_ctrl = pmod[i];
      enrb = (i % 2 == 0); enib = (i % 3 == 0);
      #1;
      checks++;
      if (zr_oe !== ~enrb || zi_oe !== ~enib) failures++;
      @(posedge clk);
      #1;
      // now in cycle i+1
      if (i + 1 < NCYC && ev[i + 1]) begin
        checks++;
        if (longint'(zr) != er[i + 1] || longint'(zi) != ei[i + 1]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %0d,%0d exp %0d,%0d", i + 1, zr, zi, er[i + 1], ei[i + 1]);
        end
        if (i + 1 < 4 * NB + 20) begin
          out_count++;
          if (first_out < 0) first_out = i + 1;
          last_out = i + 1;
        end
      end
      @(negedge clk);
    end
    // rate: 4*NB butterfly outputs in 4*NB consecutive cycles; latency from
    // first input (cycle 0) to first output is 11 cycles
    checks++;
    if (out_count != 4 * NB || last_out - first_out != 4 * NB - 1 || first_out != 11) begin
      failures++;
      $display("rate/latency: %0d outputs, cycles %0d..%0d", out_count, first_out, last_out);
    end
    checks++;
    if (int'(max_o) != exp_max) begin
      failures++;
      $display("MAX %0d expected %0d", max_o, exp_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
