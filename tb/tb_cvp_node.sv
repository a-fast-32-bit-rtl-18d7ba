// tb_cvp_node: end-to-end test of the single-CVP node board.
//
// Loads three processes into the control store and four tags into the hash
// table, then sends four blocks (header + 16 words):
//   tag 1: weight each word by a complex coefficient, output the products;
//   tag 3: radix-4 butterflies, data staged through the scratch memory;
//         this block arrives slowly, so the scheduler must wait for data;
//   tag 2: weight and output the modulus;
//   tag 4: the tag-1 process, but its table entry reserves almost the whole
//         output queue, so it must wait for space until the output is read.
// The output queue is read only after all blocks are in. Every output word,
// headers included (tag replaced), is compared with values computed here.
// The test counts each mechanism (wait for data, wait for space, dispatch,
// scratch traffic, modulus, butterflies) and fails if one never happened.
module tb_cvp_node;
  import cvp_pkg::*;
  import cvp_node_pkg::*;
  import cvp_prog_pkg::*;

  localparam int QDEPTH = 64, SDEPTH = 64, WCS_DEPTH = 1024, HASH_N = 256;

  logic clk = 0, rst_n = 0;
  logic in_wr_en, in_full, out_rd_en, out_empty;
  cplx_t in_wr_data, out_rd_data;
  logic host_wcs_we, host_hash_we;
  logic [$clog2(WCS_DEPTH)-1:0] host_wcs_addr;
  uword_t host_wcs_data;
  logic [7:0] host_hash_addr;
  hash_entry_t host_hash_data;
  logic busy, wait_data, wait_space, done;
  logic [3:0] max_o;

  cvp_node #(.QDEPTH(QDEPTH), .SDEPTH(SDEPTH), .WCS_DEPTH(WCS_DEPTH), .HASH_N(HASH_N)) dut (.*);

  int checks = 0, failures = 0;
  int n_wait_data = 0, n_wait_space = 0, n_done = 0, n_scr_wr = 0, n_scr_rd = 0;
  cplx_t expq [$];
  int last_expo_max;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (wait_data) n_wait_data++;
    if (wait_space) n_wait_space++;
    if (done) n_done++;
    if (dut.uw.scr_we) n_scr_wr++;
    if (dut.uvalid && dut.uw.src == SRC_SCRATCH) n_scr_rd++;
  end

  task automatic load_prog(input int addr, input prog_t p);
    for (int i = 0; i < p.size(); i++) begin
      host_wcs_we = 1; host_wcs_addr = $clog2(WCS_DEPTH)'(addr + i); host_wcs_data = p[i];
      @(negedge clk);
    end
    host_wcs_we = 0;
  endtask

  task automatic load_hash(input int tag, input int start, inw, outw, input int otag);
    host_hash_we = 1; host_hash_addr = 8'(tag);
    host_hash_data.start = 16'(start); host_hash_data.in_words = 16'(inw);
    host_hash_data.out_words = 16'(outw); host_hash_data.out_tag = 8'(otag);
    @(negedge clk);
    host_hash_we = 0;
  endtask

  task automatic send(input cplx_t w, input int gap);
    while (in_full) @(negedge clk);
    in_wr_en = 1; in_wr_data = w;
    @(negedge clk);
    in_wr_en = 0;
    repeat (gap) @(negedge clk);
  endtask

  longint wr1, wi1, wr2, wi2;
  longint twr [4], twi [4];

  // send one block and queue its expected output
  task automatic block(input int tag, input int otag, input int kind, input int gap);
    cplx_t h, w, e;
    longint xr [16], xi [16], yr, yi;
    h.re = {24'($urandom), 8'(tag)}; h.im = $urandom;
    e = h; e.re[7:0] = 8'(otag);
    expq.push_back(e);
    send(h, gap);
    for (int i = 0; i < 16; i++) begin
      xr[i] = longint'(signed'($urandom)) >>> 1; xi[i] = longint'(signed'($urandom)) >>> 1;
      if (kind == 0 && i == 5) begin xr[i] = xr[i] >>> 14; xi[i] = xi[i] >>> 14; end
      w.re = 32'(xr[i]); w.im = 32'(xi[i]);
      send(w, gap);
    end
    last_expo_max = 0;
    if (kind == 2) begin
      for (int bf = 0; bf < 4; bf++) begin
        longint gr [4], gi [4], orr [4], oi [4];
        for (int q = 0; q < 4; q++) begin gr[q] = xr[4*bf+q]; gi[q] = xi[4*bf+q]; end
        bfly_ref(gr, gi, twr, twi, 2, orr, oi);
        for (int k = 0; k < 4; k++) begin e.re = 32'(orr[k]); e.im = 32'(oi[k]); expq.push_back(e); end
      end
    end else begin
      for (int i = 0; i < 16; i++) begin
        cmulq(xr[i], xi[i], kind == 1 ? wr2 : wr1, kind == 1 ? wi2 : wi1, yr, yi);
        yr = shsat(yr, 0); yi = shsat(yi, 0);
        if (kind == 1) begin yr = modulus(yr, yi); yi = 0; end
        e.re = 32'(yr); e.im = 32'(yi);
        if (expo_of(yr, yi) > last_expo_max) last_expo_max = expo_of(yr, yi);
        expq.push_back(e);
      end
    end
  endtask

  initial begin
    int nout;
    in_wr_en = 0; in_wr_data = '0; out_rd_en = 0;
    host_wcs_we = 0; host_wcs_addr = 0; host_wcs_data = '0;
    host_hash_we = 0; host_hash_addr = 0; host_hash_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr1 = 64'sd1288490189; wi1 = -64'sd644245094;   // 0.6 - 0.3j
    wr2 = -64'sd858993459; wi2 = 64'sd1503238554;   // -0.4 + 0.7j
    twr[0] = 64'sd2147483647; twi[0] = 0;
    for (int q = 1; q < 4; q++) begin
      twr[q] = longint'(signed'($urandom)) >>> 1; twi[q] = longint'(signed'($urandom)) >>> 1;
    end
    load_prog(0, prog_weight(16, wr1, wi1, 0));
    load_prog(100, prog_weight(16, wr2, wi2, 1));
    load_prog(200, prog_bfly(4, twr, twi, 2));
    load_hash(1, 0, 16, 16, 8'h81);
    load_hash(2, 100, 16, 16, 8'h82);
    load_hash(3, 200, 16, 16, 8'h83);
    load_hash(4, 0, 16, QDEPTH - 1, 8'h84);
    block(1, 8'h81, 0, 0);
    block(3, 8'h83, 2, 3);
    block(2, 8'h82, 1, 0);
    block(4, 8'h84, 0, 0);
    repeat (100) @(negedge clk);
    // drain and compare
    nout = 0;
    while (expq.size() > 0 && nout < 1000) begin
      if (!out_empty) begin
        checks++;
        if (out_rd_data !== expq[0]) begin
          failures++;
          if (failures < 10) $display("out %0d: got %h exp %h", nout, out_rd_data, expq[0]);
        end
        void'(expq.pop_front());
        out_rd_en = 1;
      end else out_rd_en = 0;
      @(negedge clk);
      out_rd_en = 0;
      nout++;
    end
    repeat (50) @(negedge clk);
    checks++;
    if (expq.size() != 0 || !out_empty) failures++;
    checks++;
    if (int'(max_o) != last_expo_max) begin failures++; $display("MAX %0d exp %0d", max_o, last_expo_max); end
    $display("mechanisms: wait_data=%0d wait_space=%0d processes=%0d scratch_wr=%0d scratch_rd=%0d",
             n_wait_data, n_wait_space, n_done, n_scr_wr, n_scr_rd);
    checks++;
    if (n_wait_data == 0 || n_wait_space == 0 || n_done != 4 || n_scr_wr != 16 || n_scr_rd != 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
