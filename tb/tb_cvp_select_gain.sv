// tb_cvp_select_gain: self-checking test of accumulator selection and gain.
// Random accumulator contents, selections and shifts; the expected output is
// the selected value divided by 2^shift (rounded towards minus infinity) and
// clamped to the 32-bit range, one clock later.
module tb_cvp_select_gain;
  import cvp_pkg::*;

  logic clk = 0, rst_n = 0;
  acc_t acc [4];
  logic [1:0] sel;
  logic [3:0] shift;
  cplx_t z;
  int checks = 0, failures = 0, sat_hits = 0;

  cvp_select_gain dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_one(input logic signed [39:0] v, input int sh);
    longint x;
    x = longint'(v);
    x = (x >= 0) ? x / (64'sd1 << sh) : -((-x + (64'sd1 << sh) - 1) / (64'sd1 << sh));
    if (x > 64'sd2147483647) x = 64'sd2147483647;
    if (x < -64'sd2147483648) x = -64'sd2147483648;
    return x;
  endfunction

  initial begin
    longint er, ei;
    sel = 0; shift = 0;
    for (int k = 0; k < 4; k++) acc[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      for (int k = 0; k < 4; k++) begin
        // mix of in-range and large values
        if ($urandom % 2) begin
          acc[k].re = 40'(signed'($urandom));
          acc[k].im = 40'(signed'($urandom));
        end else begin
          acc[k].re = {8'($urandom), $urandom};
          acc[k].im = {8'($urandom), $urandom};
        end
      end
      sel = 2'($urandom);
      shift = 4'($urandom % 10);
      er = ref_one(acc[sel].re, int'(shift));
      ei = ref_one(acc[sel].im, int'(shift));
      if (er == 64'sd2147483647 || er == -64'sd2147483648) sat_hits++;
      @(negedge clk);
      checks++;
      if (longint'(z.re) != er || longint'(z.im) != ei) begin
        failures++;
        if (failures < 10) $display("sel %0d sh %0d got %0d exp %0d", sel, shift, z.re, er);
      end
    end
    checks++;
    if (sat_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
