// tb_cvp_tap_pipe: self-checking test of the four-tap product pipeline.
// A new random product enters every clock; tap k must show the product that
// entered k+1 clocks earlier.
module tb_cvp_tap_pipe;
  import cvp_pkg::*;

  logic clk = 0, rst_n = 0;
  prod_t din;
  prod_t tap [4];
  prod_t hist [$];
  int checks = 0, failures = 0;

  cvp_tap_pipe #(.NSTAGE(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      din.re = {$urandom, $urandom};
      din.im = {$urandom, $urandom};
      hist.push_front(din);       // hist[0] = newest
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        if (hist.size() > k) begin
          checks++;
          if (tap[k] !== hist[k]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
