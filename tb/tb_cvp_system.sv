// tb_cvp_system: end-to-end test of both boards at full size.
//
// The top is built with its default parameters (64K-word control store,
// 4096-word queues, scratch and systolic memories, 8K-word frame program).
// Two tests run at the same time:
//  - the single-CVP node receives four blocks that exercise dispatch through
//    the hash table, tag modification, waiting for input data, waiting for
//    output space, complex weighting, modulus extraction, radix-4
//    butterflies through the scratch memory and the gain monitor;
//  - the systolic board streams 256-word frames through its four CVPs and
//    double-banked memories, checking every word of every frame.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_cvp_system;
  import cvp_pkg::*;
  import cvp_node_pkg::*;
  import cvp_prog_pkg::*;

  localparam int S_NNODE = 4, S_F = 256, S_MA = 12;
  localparam int SW = S_NNODE * (64 + $bits(mul_ctrl_t) + NACC * $bits(acc_op_e) +
                                 $bits(mod_ctrl_t) + 2 * S_MA + 1) + 1;

  logic clk = 0, rst_n = 0;
  logic node_in_wr_en, node_in_full, node_out_rd_en, node_out_empty;
  cplx_t node_in_wr_data, node_out_rd_data;
  logic node_host_wcs_we, node_host_hash_we;
  logic [15:0] node_host_wcs_addr;
  uword_t node_host_wcs_data;
  logic [7:0] node_host_hash_addr;
  hash_entry_t node_host_hash_data;
  logic node_busy, node_wait_data, node_wait_space, node_done;
  logic [3:0] node_max;
  logic sys_run, sys_in_we, sys_host_we, sys_frame_tick;
  logic [S_MA-1:0] sys_in_addr, sys_out_addr;
  cplx_t sys_in_data, sys_out_data;
  logic [12:0] sys_host_addr;
  logic [SW-1:0] sys_host_data;
  logic [3:0] sys_max [S_NNODE];

  cvp_system dut (.*);

  int checks = 0, failures = 0;
  int n_node_wait_data = 0, n_node_wait_space = 0, n_done = 0, n_scr_wr = 0, n_scr_rd = 0;
  cplx_t expq [$];
  int last_expo_max;

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (node_wait_data) n_node_wait_data++;
    if (node_wait_space) n_node_wait_space++;
    if (node_done) n_done++;
    if (dut.u_node.uw.scr_we) n_scr_wr++;
    if (dut.u_node.uvalid && dut.u_node.uw.src == SRC_SCRATCH) n_scr_rd++;
  end

  task automatic load_prog(input int addr, input prog_t p);
    for (int i = 0; i < p.size(); i++) begin
      node_host_wcs_we = 1; node_host_wcs_addr = 16'(addr + i); node_host_wcs_data = p[i];
      @(negedge clk);
    end
    node_host_wcs_we = 0;
  endtask

  task automatic load_hash(input int tag, input int start, inw, outw, input int otag);
    node_host_hash_we = 1; node_host_hash_addr = 8'(tag);
    node_host_hash_data.start = 16'(start); node_host_hash_data.in_words = 16'(inw);
    node_host_hash_data.out_words = 16'(outw); node_host_hash_data.out_tag = 8'(otag);
    @(negedge clk);
    node_host_hash_we = 0;
  endtask

  task automatic send(input cplx_t w, input int gap);
    while (node_in_full) @(negedge clk);
    node_in_wr_en = 1; node_in_wr_data = w;
    @(negedge clk);
    node_in_wr_en = 0;
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



  // ---- systolic board stimulus
  typedef struct packed {
    logic signed [31:0]  coef_re;
    logic signed [31:0]  coef_im;
    mul_ctrl_t           mul;
    acc_op_e [NACC-1:0]  acc_op;
    mod_ctrl_t           modc;
    logic [S_MA-1:0]     raddr;
    logic [S_MA-1:0]     waddr;
    logic                we;
  } snode_t;
  typedef struct packed {
    snode_t [S_NNODE-1:0] node;
    logic                 last;
  } sword_t;

  int n_ticks = 0, n_frames_checked = 0;
  longint s_wr [S_NNODE], s_wi [S_NNODE];
  acc_op_e s_op [S_NNODE];

  function automatic sword_t s_nopw();
    sword_t w;
    w = '0;
    for (int i = 0; i < S_NNODE; i++) for (int k = 0; k < NACC; k++) w.node[i].acc_op[k] = ACC_HOLD;
    return w;
  endfunction

  // node i: read word j of its input frame in cycle j, multiply by s_w[i],
  // apply s_op[i] in W, write to word j (even i) or F-1-j (odd i) of its
  // output frame; the program is F + 12 words long.
  task automatic s_load_program();
    sword_t p [S_F + 12];
    acc_op_e ops [4] = '{ACC_LOAD, ACC_CONJ, ACC_NEGJ, ACC_LOADJ};
    for (int c = 0; c < S_F + 12; c++) p[c] = s_nopw();
    for (int i = 0; i < S_NNODE; i++) begin
      s_op[i] = ops[i % 4];
      s_wr[i] = longint'(signed'($urandom)) >>> 1;
      s_wi[i] = longint'(signed'($urandom)) >>> 1;
      for (int j = 0; j < S_F; j++) begin
        p[j].node[i].raddr = S_MA'(j);
        p[j].node[i].coef_re = 32'(s_wr[i]); p[j].node[i].coef_im = 32'(s_wi[i]);
        p[j + 4].node[i].acc_op[0] = s_op[i];
        p[j + 5].node[i].modc.sel = 2'd0;
        p[j + 5].node[i].modc.gm_en = 1'b1;
        p[j + 5].node[i].modc.gm_clr = (j == 0);
        p[j + 8].node[i].we = 1'b1;
        p[j + 8].node[i].waddr = S_MA'((i % 2) ? S_F - 1 - j : j);
      end
    end
    p[S_F + 11].last = 1'b1;
    for (int c = 0; c < S_F + 12; c++) begin
      sys_host_we = 1; sys_host_addr = $bits(sys_host_addr)'(c); sys_host_data = p[c];
      @(negedge clk);
    end
    sys_host_we = 0;
  endtask

  function automatic void s_ref(input longint xr, xi, output longint yr, yi);
    longint tr, ti;
    yr = xr; yi = xi;
    for (int i = 0; i < S_NNODE; i++) begin
      cmulq(yr, yi, s_wr[i], s_wi[i], tr, ti);
      case (s_op[i])
        ACC_CONJ:  begin yr = tr;  yi = -ti; end
        ACC_NEGJ:  begin yr = ti;  yi = -tr; end
        ACC_LOADJ: begin yr = -ti; yi = tr;  end
        default:   begin yr = tr;  yi = ti;  end
      endcase
      yr = shsat(yr, 0); yi = shsat(yi, 0);
    end
  endfunction

  // run NF frames through the pipeline and check each at the output
  task automatic s_run(input int NF);
    longint fr [$][S_F], fi [$][S_F];
    int L, lat;
    L = S_F + 12;
    lat = S_NNODE + 1;
    sys_run = 1;
    @(negedge clk);
    for (int p = 0; p < NF + lat; p++) begin
      longint nr [S_F], ni [S_F];
      for (int j = 0; j < S_F; j++) begin
        nr[j] = longint'(signed'($urandom)) >>> 1; ni[j] = longint'(signed'($urandom)) >>> 1;
      end
      fr.push_back(nr); fi.push_back(ni);
      for (int c = 0; c < L; c++) begin
        sys_in_we = (c < S_F) && (p < NF);
        sys_in_addr = $bits(sys_in_addr)'(c);
        sys_in_data.re = 32'(nr[c % S_F]); sys_in_data.im = 32'(ni[c % S_F]);
        sys_out_addr = $bits(sys_out_addr)'(c % S_F);
        #1;
        if (p >= lat && c < S_F) begin
          longint er, ei;
          // two odd nodes each reverse the frame; an odd count leaves it reversed
          int src;
          src = (S_NNODE / 2) % 2 ? S_F - 1 - c : c;
          s_ref(fr[p - lat][src], fi[p - lat][src], er, ei);
          checks++;
          if (longint'(sys_out_data.re) != er || longint'(sys_out_data.im) != ei) begin
            failures++;
            if (failures < 10) $display("frame %0d word %0d: got %0d,%0d exp %0d,%0d", p - lat, c, sys_out_data.re, sys_out_data.im, er, ei);
          end
          if (c == S_F - 1) n_frames_checked++;
        end
        checks++;
        if (sys_frame_tick !== (c == L - 1)) failures++;
        if (sys_frame_tick) n_ticks++;
        @(negedge clk);
      end
    end
    sys_in_we = 0;
  endtask

  task automatic node_test();
    int nout;
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
    load_hash(4, 0, 16, 4096 - 1, 8'h84);
    block(1, 8'h81, 0, 0);
    block(3, 8'h83, 2, 3);
    block(2, 8'h82, 1, 0);
    block(4, 8'h84, 0, 0);
    repeat (100) @(negedge clk);
    // drain and compare
    nout = 0;
    while (expq.size() > 0 && nout < 1000) begin
      if (!node_out_empty) begin
        checks++;
        if (node_out_rd_data !== expq[0]) begin
          failures++;
          if (failures < 10) $display("out %0d: got %h exp %h", nout, node_out_rd_data, expq[0]);
        end
        void'(expq.pop_front());
        node_out_rd_en = 1;
      end else node_out_rd_en = 0;
      @(negedge clk);
      node_out_rd_en = 0;
      nout++;
    end
    repeat (50) @(negedge clk);
    checks++;
    if (expq.size() != 0 || !node_out_empty) failures++;
    checks++;
    if (int'(node_max) != last_expo_max) begin failures++; $display("MAX %0d exp %0d", node_max, last_expo_max); end
    $display("mechanisms: node_wait_data=%0d node_wait_space=%0d processes=%0d scratch_wr=%0d scratch_rd=%0d",
             n_node_wait_data, n_node_wait_space, n_done, n_scr_wr, n_scr_rd);
    checks++;
    if (n_node_wait_data == 0 || n_node_wait_space == 0 || n_done != 4 || n_scr_wr != 16 || n_scr_rd != 16) failures++;
  endtask

  initial begin
    node_in_wr_en = 0; node_in_wr_data = '0; node_out_rd_en = 0;
    node_host_wcs_we = 0; node_host_wcs_addr = 0; node_host_wcs_data = '0;
    node_host_hash_we = 0; node_host_hash_addr = 0; node_host_hash_data = '0;
    sys_run = 0; sys_in_we = 0; sys_in_addr = 0; sys_in_data = '0; sys_out_addr = 0;
    sys_host_we = 0; sys_host_addr = 0; sys_host_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      node_test();
      begin
        s_load_program();
        s_run(4);
      end
    join
    $display("systolic: frames checked %0d, frame ticks %0d", n_frames_checked, n_ticks);
    checks++;
    if (n_frames_checked != 4 || n_ticks != 4 + S_NNODE + 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
