// cvp_node: single CVP processor board.
//
// A self-scheduling node of a signal flow network. Blocks of complex data,
// each led by a header word carrying a channel tag, arrive in the input
// queue. The scheduler holds a block back until it is complete and the
// output queue has room for the result, then uses the tag to find the
// process in the hash table, copies the header (with its tag replaced) to
// the output queue and runs the process's micro-code from the writeable
// control store, one 144-bit word per clock. Each word chooses the data for
// the CVP's A/B busses (input queue head, scratch memory or zero), carries
// the coefficient for its C/D busses, gives the CVP's multiplier,
// accumulator and output controls, and says whether the CVP's ZR/ZI output
// of that clock is written to the scratch memory, to the output queue, or
// both. Micro-code must allow for the CVP's pipeline latency (see cvp).
//
// Interfaces: an input data port (in_wr), an output data port (out_rd), a
// host port that loads the control store and hash table at any time, and
// status outputs. Everything runs on one clock.
//
// Queue, scratch and hash table sizes, the micro-instruction layout, the
// coefficient source and the header format are this design's choices; the
// document gives the block structure, the 64K x 144 control store and the
// scheduling rule.
module cvp_node
  import cvp_pkg::*;
  import cvp_node_pkg::*;
#(
  parameter int QDEPTH    = 4096,
  parameter int SDEPTH    = 4096,
  parameter int WCS_DEPTH = 65536,
  parameter int HASH_N    = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // input data port
  input  logic        in_wr_en,
  input  cplx_t       in_wr_data,
  output logic        in_full,
  // output data port
  input  logic        out_rd_en,
  output cplx_t       out_rd_data,
  output logic        out_empty,
  // host port
  input  logic        host_wcs_we,
  input  logic [$clog2(WCS_DEPTH)-1:0] host_wcs_addr,
  input  uword_t      host_wcs_data,
  input  logic        host_hash_we,
  input  logic [$clog2(HASH_N)-1:0] host_hash_addr,
  input  hash_entry_t host_hash_data,
  // status
  output logic        busy,
  output logic        wait_data,
  output logic        wait_space,
  output logic        done,
  output logic [EW-1:0] max_o
);

  localparam int QC = $clog2(QDEPTH) + 1;

  // queues
  cplx_t          iq_head, oq_wdata;
  logic           iq_empty, iq_full_unused, iq_pop;
  logic [QC-1:0]  iq_count, iq_free_unused, oq_count_unused, oq_free;
  logic           oq_push, oq_full;

  cvp_queue #(.DEPTH(QDEPTH)) u_iq (
    .clk, .rst_n, .wr_en(in_wr_en), .wr_data(in_wr_data), .rd_en(iq_pop),
    .rd_data(iq_head), .empty(iq_empty), .full(iq_full_unused),
    .count(iq_count), .free(iq_free_unused)
  );
  assign in_full = iq_full_unused;

  cvp_queue #(.DEPTH(QDEPTH)) u_oq (
    .clk, .rst_n, .wr_en(oq_push), .wr_data(oq_wdata), .rd_en(out_rd_en),
    .rd_data(out_rd_data), .empty(out_empty), .full(oq_full),
    .count(oq_count_unused), .free(oq_free)
  );

  // hash table and scheduler
  hash_entry_t entry;
  cplx_t       out_header;
  logic        hdr_pop, hdr_push, uvalid;
  logic [WCS_AW-1:0] wcs_raddr;
  uword_t      uw_raw, uw;

  cvp_hash_table #(.ENTRIES(HASH_N)) u_hash (
    .clk, .rst_n, .host_we(host_hash_we), .host_addr(host_hash_addr),
    .host_data(host_hash_data), .header(iq_head), .entry, .out_header
  );

  cvp_scheduler #(.QCNT_W(QC)) u_sched (
    .clk, .rst_n, .iq_empty, .iq_count, .hdr_pop, .oq_free, .hdr_push,
    .entry, .wcs_raddr, .uword_last(uw_raw.last), .uword_valid(uvalid),
    .busy, .wait_data, .wait_space, .done
  );

  cvp_wcs #(.DEPTH(WCS_DEPTH), .WIDTH(UW)) u_wcs (
    .clk, .host_we(host_wcs_we), .host_addr(host_wcs_addr), .host_data(host_wcs_data),
    .raddr(wcs_raddr[$clog2(WCS_DEPTH)-1:0]), .rdata(uw_raw)
  );

  // Only a valid word acts; otherwise the node issues no-operations.
  always_comb begin
    uw = uvalid ? uw_raw : '0;
    if (!uvalid) for (int k = 0; k < NACC; k++) uw.acc_op[k] = ACC_HOLD;
  end

  // scratch
  cplx_t scr_rdata, cvp_out;

  cvp_scratch #(.DEPTH(SDEPTH)) u_scr (
    .clk, .we(uw.scr_we), .waddr(uw.scr_waddr[$clog2(SDEPTH)-1:0]), .wdata(cvp_out),
    .raddr(uw.scr_raddr[$clog2(SDEPTH)-1:0]), .rdata(scr_rdata)
  );

  // CVP
  cplx_t   ab;
  acc_op_e ops [NACC];
  logic    zr_oe_unused, zi_oe_unused;

  always_comb begin
    unique case (uw.src)
      SRC_INQ:     ab = iq_head;
      SRC_SCRATCH: ab = scr_rdata;
      default:     ab = '0;
    endcase
    for (int k = 0; k < NACC; k++) ops[k] = uw.acc_op[k];
  end

  cvp u_cvp (
    .clk, .rst_n, .a(ab.re), .b(ab.im), .c(uw.coef_re), .d(uw.coef_im),
    .mul_ctrl(uw.mul), .acc_op(ops), .mod_ctrl(uw.modc), .enrb(1'b0), .enib(1'b0),
    .zr(cvp_out.re), .zi(cvp_out.im), .zr_oe(zr_oe_unused), .zi_oe(zi_oe_unused), .max_o
  );

  // queue control
  assign iq_pop   = hdr_pop | uw.iq_pop;
  assign oq_push  = hdr_push | uw.oq_push;
  assign oq_wdata = hdr_push ? out_header : cvp_out;

  a_oq_room: assert property (@(posedge clk) disable iff (!rst_n) !(oq_push && oq_full));

endmodule
