// tb_cvp_scratch: self-checking test of the dual-port scratch memory.
// Random writes and reads in the same clock against an array model;
// read data must follow the read address within the clock, and a write
// must be visible from the next clock.
module tb_cvp_scratch;
  import cvp_pkg::*;
  localparam int DEPTH = 64;

  logic clk = 0;
  logic we;
  logic [5:0] waddr, raddr;
  cplx_t wdata, rdata;
  cplx_t model [DEPTH];
  bit valid [DEPTH];
  int checks = 0, failures = 0;

  cvp_scratch #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      we = ($urandom % 2) == 1;
      waddr = 6'($urandom); raddr = 6'($urandom);
      if (i % 7 == 0) raddr = waddr;
      wdata.re = $urandom; wdata.im = $urandom;
      #1;
      if (valid[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) failures++;
      end
      @(posedge clk);
      if (we) begin model[waddr] = wdata; valid[waddr] = 1; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
