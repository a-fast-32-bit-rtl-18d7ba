// tb_cvp_wcs: self-checking test of the writeable control store.
// Downloads random words, then reads them back in sequence (one clock read
// latency) while the host keeps rewriting other addresses.
module tb_cvp_wcs;
  localparam int DEPTH = 256, WIDTH = 144;

  logic clk = 0;
  logic host_we;
  logic [7:0] host_addr, raddr;
  logic [WIDTH-1:0] host_data, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  cvp_wcs #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [WIDTH-1:0] expect_q;
    host_we = 0; host_addr = 0; host_data = '0; raddr = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      host_we = 1; host_addr = 8'(i); host_data = rnd(); model[i] = host_data;
      @(negedge clk);
    end
    host_we = 0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < DEPTH; i++) begin
        raddr = 8'(i);
        // host rewrites the word just behind the read pointer
        host_we = (i > 2); host_addr = 8'(i - 2); host_data = rnd();
        expect_q = model[i];
        @(posedge clk);
        if (host_we) model[host_addr] = host_data;
        #1;
        checks++;
        if (rdata !== expect_q) failures++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
