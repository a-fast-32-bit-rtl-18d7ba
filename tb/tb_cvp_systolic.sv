// tb_cvp_systolic: end-to-end test of the four-node systolic board.
//
// Each node multiplies every word of its frame by its own complex
// coefficient and applies its own accumulator operation (load, conj, -j*t,
// j*t); the odd nodes also write the frame in reverse order. Frames are
// written into the input memory one per frame period and must appear, fully
// transformed, in the output memory five periods later (one per node plus
// the input memory). Every word of every frame is compared with values
// computed here, and the frame tick must come exactly every program length.
module tb_cvp_systolic;
  import cvp_pkg::*;
  import cvp_prog_pkg::*;

  localparam int S_NNODE = 4, MDEPTH = 64, PROG_DEPTH = 128, S_F = 32;
  localparam int S_MA = $clog2(MDEPTH);
  localparam int SW = S_NNODE * (64 + $bits(mul_ctrl_t) + NACC * $bits(acc_op_e) +
                                 $bits(mod_ctrl_t) + 2 * S_MA + 1) + 1;

  logic clk = 0, rst_n = 0;
  logic run, in_we, host_we, frame_tick;
  logic [S_MA-1:0] in_addr, out_addr;
  cplx_t in_data, out_data;
  logic [$clog2(PROG_DEPTH)-1:0] host_addr;
  logic [SW-1:0] host_data;
  logic [3:0] max_o [S_NNODE];
  int checks = 0, failures = 0;

  cvp_systolic #(.NNODE(S_NNODE), .MDEPTH(MDEPTH), .PROG_DEPTH(PROG_DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      host_we = 1; host_addr = $bits(host_addr)'(c); host_data = p[c];
      @(negedge clk);
    end
    host_we = 0;
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
    run = 1;
    @(negedge clk);
    for (int p = 0; p < NF + lat; p++) begin
      longint nr [S_F], ni [S_F];
      for (int j = 0; j < S_F; j++) begin
        nr[j] = longint'(signed'($urandom)) >>> 1; ni[j] = longint'(signed'($urandom)) >>> 1;
      end
      fr.push_back(nr); fi.push_back(ni);
      for (int c = 0; c < L; c++) begin
        in_we = (c < S_F) && (p < NF);
        in_addr = $bits(in_addr)'(c);
        in_data.re = 32'(nr[c % S_F]); in_data.im = 32'(ni[c % S_F]);
        out_addr = $bits(out_addr)'(c % S_F);
        #1;
        if (p >= lat && c < S_F) begin
          longint er, ei;
          // two odd nodes each reverse the frame; an odd count leaves it reversed
          int src;
          src = (S_NNODE / 2) % 2 ? S_F - 1 - c : c;
          s_ref(fr[p - lat][src], fi[p - lat][src], er, ei);
          checks++;
          if (longint'(out_data.re) != er || longint'(out_data.im) != ei) begin
            failures++;
            if (failures < 10) $display("frame %0d word %0d: got %0d,%0d exp %0d,%0d", p - lat, c, out_data.re, out_data.im, er, ei);
          end
          if (c == S_F - 1) n_frames_checked++;
        end
        checks++;
        if (frame_tick !== (c == L - 1)) failures++;
        if (frame_tick) n_ticks++;
        @(negedge clk);
      end
    end
    in_we = 0;
  endtask

  initial begin
    run = 0; in_we = 0; in_addr = 0; in_data = '0; out_addr = 0;
    host_we = 0; host_addr = 0; host_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    s_load_program();
    s_run(6);
    checks++;
    if (n_frames_checked != 6 || n_ticks != 6 + S_NNODE + 1) failures++;
    $display("frames checked %0d, frame ticks %0d", n_frames_checked, n_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
