// tb_cvp_hash_table: self-checking test of the hash table and tag modify.
// Loads random entries, then presents headers with random tags and upper
// bits: the entry must be the one stored for the tag, and the output header
// must equal the input header with only its low 8 bits replaced.
module tb_cvp_hash_table;
  import cvp_pkg::*;
  import cvp_node_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_we;
  logic [7:0] host_addr;
  hash_entry_t host_data, entry;
  cplx_t header, out_header;
  hash_entry_t model [256];
  int checks = 0, failures = 0;

  cvp_hash_table #(.ENTRIES(256)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_we = 0; host_addr = 0; host_data = '0; header = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) model[i] = '0;
    for (int i = 0; i < 2000; i++) begin
      host_we = ($urandom % 3) == 0;
      host_addr = 8'($urandom);
      host_data = {$urandom, $urandom};
      header.re = $urandom; header.im = $urandom;
      #1;
      checks++;
      if (entry !== model[header.re[7:0]] || out_header.im !== header.im ||
          out_header.re[31:8] !== header.re[31:8] ||
          out_header.re[7:0] !== model[header.re[7:0]].out_tag) failures++;
      @(posedge clk);
      if (host_we) model[host_addr] = host_data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
