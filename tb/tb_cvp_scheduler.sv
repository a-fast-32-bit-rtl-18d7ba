// tb_cvp_scheduler: self-checking test of the process scheduler.
// A small behavioural environment supplies queue levels, a hash entry and
// micro-code "last" bits. Checks: no start before the block is complete
// (wait_data) or before the output has room (wait_space); the header is
// taken and the start address presented in the dispatch clock; the address
// then steps by one per clock; the process ends on the word marked last,
// after exactly the programmed number of words.
module tb_cvp_scheduler;
  import cvp_pkg::*;
  import cvp_node_pkg::*;

  logic clk = 0, rst_n = 0;
  logic iq_empty, hdr_pop, hdr_push, uword_last, uword_valid, busy, wait_data, wait_space, done;
  logic [12:0] iq_count, oq_free;
  hash_entry_t entry;
  logic [15:0] wcs_raddr;
  int checks = 0, failures = 0, n_wait_data = 0, n_wait_space = 0, n_runs = 0;

  cvp_scheduler #(.QCNT_W(13)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural control store: word at address a is last if a == last_addr
  logic [15:0] last_addr, fetched;
  always_ff @(posedge clk) fetched <= wcs_raddr;
  assign uword_last = (fetched == last_addr);

  initial begin
    iq_empty = 1; iq_count = 0; oq_free = 100; entry = '0; last_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      int inw, outw, len, cnt;
      logic [15:0] st;
      inw = 1 + $urandom % 20; outw = 1 + $urandom % 20; len = 1 + $urandom % 15;
      st = 16'($urandom);
      entry.start = st; entry.in_words = 16'(inw); entry.out_words = 16'(outw);
      last_addr = st + 16'(len - 1);
      // block arrives word by word; output has too little room at first
      oq_free = 13'(outw);
      iq_empty = 0;
      for (int c = 1; c <= inw + 1; c++) begin
        iq_count = 13'(c);
        #1;
        checks++;
        if (hdr_pop) failures++;
        if (c <= inw) begin checks++; if (!wait_data) failures++; n_wait_data++; end
        else begin checks++; if (!wait_space) failures++; n_wait_space++; end
        @(negedge clk);
      end
      oq_free = 13'(outw + 1);
      #1;
      checks++;
      if (!hdr_pop || !hdr_push || wcs_raddr != st || busy) failures++;
      @(negedge clk);
      iq_count = 13'(inw); iq_empty = 0;
      cnt = 0;
      while (busy) begin
        checks++;
        if (!uword_valid || wcs_raddr != st + 16'(cnt + 1) || hdr_pop) failures++;
        cnt++;
        @(negedge clk);
        if (cnt > 100) break;
      end
      checks++;
      if (cnt != len) begin
        failures++;
        $display("run %0d: ran %0d words, expected %0d", r, cnt, len);
      end
      n_runs++;
      iq_empty = 1; iq_count = 0;
      @(negedge clk);
    end
    checks++;
    if (n_wait_data == 0 || n_wait_space == 0 || n_runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
