// tb_cvp_queue: self-checking test of the biport FIFO queue.
// Random simultaneous pushes and pops against a SystemVerilog queue model,
// filling it to full and draining it to empty; checks head data, count,
// free, full and empty every clock.
module tb_cvp_queue;
  import cvp_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  cplx_t wr_data, rd_data;
  logic [4:0] count, free;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  cplx_t model [$];

  cvp_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      // phases: mostly fill, mostly drain, mixed
      int pw;
      pw = (i % 300 < 100) ? 80 : (i % 300 < 200 ? 20 : 50);
      wr_en = (($urandom % 100) < pw) && model.size() < DEPTH;
      rd_en = (($urandom % 100) < 100 - pw) && model.size() > 0;
      wr_data.re = $urandom; wr_data.im = $urandom;
      // check state before the edge
      checks++;
      if (int'(count) != model.size() || int'(free) != DEPTH - model.size() ||
          empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          (model.size() > 0 && rd_data !== model[0])) begin
        failures++;
        if (failures < 10) $display("i=%0d count %0d model %0d", i, count, model.size());
      end
      if (full) n_full++;
      if (empty) n_empty++;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
