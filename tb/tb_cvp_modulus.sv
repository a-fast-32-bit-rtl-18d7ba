// tb_cvp_modulus: self-checking test of modulus extraction.
// Checks pass-through and channel-absolute modes exactly, the modulus mode
// against the formula 15/16*max + 15/32*min and against the true modulus
// (within 7 %), and the 4-bit exponent against the bit length of the output.
module tb_cvp_modulus;
  import cvp_pkg::*;

  logic clk = 0, rst_n = 0;
  cplx_t zin, zout;
  mod_mode_e mode;
  logic [3:0] expo;
  int checks = 0, failures = 0;

  cvp_modulus dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint labs(input longint v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int ref_exp(input longint r, input longint m);
    longint mm;
    int len;
    mm = labs(r) > labs(m) ? labs(r) : labs(m);
    len = 0;
    while (mm > 0) begin len++; mm = mm >> 1; end
    if (len <= 16) return 0;
    if (len - 16 > 15) return 15;
    return len - 16;
  endfunction

  initial begin
    longint r, m, er, ei, mx, mn;
    real truemag;
    zin = '0; mode = MOD_PASS;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      mode = mod_mode_e'($urandom % 3);
      if (i % 3 == 0) begin
        zin.re = 32'(signed'($urandom)) >>> ($urandom % 30);
        zin.im = 32'(signed'($urandom)) >>> ($urandom % 30);
      end else begin
        zin.re = $urandom; zin.im = $urandom;
      end
      if (i == 7) begin zin.re = 32'sh8000_0000; zin.im = 32'sh8000_0000; mode = MOD_MODULUS; end
      r = longint'(zin.re); m = longint'(zin.im);
      mx = labs(r) > labs(m) ? labs(r) : labs(m);
      mn = labs(r) > labs(m) ? labs(m) : labs(r);
      case (mode)
        MOD_MODULUS: begin
          er = (mx * 15) / 16 + (mn * 15) / 32;
          if (er > 2147483647) er = 2147483647;
          ei = 0;
        end
        MOD_ABS: begin
          er = labs(r) > 2147483647 ? 2147483647 : labs(r);
          ei = labs(m) > 2147483647 ? 2147483647 : labs(m);
        end
        default: begin er = r; ei = m; end
      endcase
      @(negedge clk);
      checks++;
      if (longint'(zout.re) != er || longint'(zout.im) != ei || int'(expo) != ref_exp(er, ei)) begin
        failures++;
        if (failures < 10) $display("mode %0d in %0d,%0d got %0d,%0d e%0d exp %0d,%0d e%0d", mode, r, m, zout.re, zout.im, expo, er, ei, ref_exp(er, ei));
      end
      if (mode == MOD_MODULUS && mx < 64'sd1000000000 && mx > 1000) begin
        truemag = $sqrt(real'(r) * real'(r) + real'(m) * real'(m));
        checks++;
        if (real'(zout.re) < 0.93 * truemag || real'(zout.re) > 1.07 * truemag) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
