// tb_cvp_gain_monitor: self-checking test of the gain monitor.
// Random exponents with random enable and occasional clear; the reference is
// the running maximum of the enabled exponents since the last clear.
module tb_cvp_gain_monitor;
  logic clk = 0, rst_n = 0;
  logic [3:0] expo, max_o;
  logic en, clr;
  int checks = 0, failures = 0, clears = 0;

  cvp_gain_monitor dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    expo = 0; en = 0; clr = 0; m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      expo = 4'($urandom % (i % 200 < 100 ? 8 : 16));
      en = ($urandom % 4) != 0;
      clr = ($urandom % 40) == 0;
      if (clr) begin m = en ? int'(expo) : 0; clears++; end
      else if (en && int'(expo) > m) m = int'(expo);
      @(negedge clk);
      checks++;
      if (int'(max_o) != m) failures++;
    end
    checks++;
    if (clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
