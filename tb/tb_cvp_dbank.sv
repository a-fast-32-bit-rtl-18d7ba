// tb_cvp_dbank: self-checking test of the double-banked memory.
// For each frame the writer fills one bank with a fresh pattern while the
// reader checks the pattern written in the previous frame; banks swap at
// every frame boundary.
module tb_cvp_dbank;
  import cvp_pkg::*;
  localparam int DEPTH = 32;

  logic clk = 0, rst_n = 0;
  logic swap, we, bank;
  logic [4:0] waddr, raddr;
  cplx_t wdata, rdata;
  cplx_t prev [DEPTH], cur [DEPTH];
  int checks = 0, failures = 0;

  cvp_dbank #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    swap = 0; we = 0; waddr = 0; raddr = 0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      for (int i = 0; i < DEPTH; i++) begin
        cur[i].re = $urandom; cur[i].im = $urandom;
      end
      for (int i = 0; i < DEPTH; i++) begin
        we = 1; waddr = 5'(i); wdata = cur[i];
        raddr = 5'(DEPTH - 1 - i);
        swap = (i == DEPTH - 1);
        #1;
        if (f > 0) begin
          checks++;
          if (rdata !== prev[DEPTH - 1 - i]) failures++;
        end
        checks++;
        if (bank !== 1'(f % 2)) failures++;
        @(negedge clk);
      end
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
