// cvp_system: the two CVP board designs side by side.
//
// The Complex Vector Processor was used on two boards: a self-scheduling
// single-CVP node for signal flow networks (cvp_node) and a four-CVP
// systolic pipeline for streaming transforms (cvp_systolic). They do not
// share any signal; this module only places one of each so that both can be
// built and simulated together, with every port of each brought out under a
// `node_` or `sys_` prefix. All defaults are the full-size configurations.
module cvp_system
  import cvp_pkg::*;
  import cvp_node_pkg::*;
#(
  parameter int QDEPTH     = 4096,
  parameter int SDEPTH     = 4096,
  parameter int WCS_DEPTH  = 65536,
  parameter int HASH_N     = 256,
  parameter int NNODE      = 4,
  parameter int MDEPTH     = 4096,
  parameter int PROG_DEPTH = 8192,
  localparam int SYS_SW = NNODE * (64 + $bits(mul_ctrl_t) + NACC * $bits(acc_op_e) +
                                   $bits(mod_ctrl_t) + 2 * $clog2(MDEPTH) + 1) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- single CVP node
  input  logic        node_in_wr_en,
  input  cplx_t       node_in_wr_data,
  output logic        node_in_full,
  input  logic        node_out_rd_en,
  output cplx_t       node_out_rd_data,
  output logic        node_out_empty,
  input  logic        node_host_wcs_we,
  input  logic [$clog2(WCS_DEPTH)-1:0] node_host_wcs_addr,
  input  uword_t      node_host_wcs_data,
  input  logic        node_host_hash_we,
  input  logic [$clog2(HASH_N)-1:0] node_host_hash_addr,
  input  hash_entry_t node_host_hash_data,
  output logic        node_busy,
  output logic        node_wait_data,
  output logic        node_wait_space,
  output logic        node_done,
  output logic [EW-1:0] node_max,
  // ---- four-node systolic board
  input  logic        sys_run,
  input  logic        sys_in_we,
  input  logic [$clog2(MDEPTH)-1:0] sys_in_addr,
  input  cplx_t       sys_in_data,
  input  logic [$clog2(MDEPTH)-1:0] sys_out_addr,
  output cplx_t       sys_out_data,
  input  logic        sys_host_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] sys_host_addr,
  input  logic [SYS_SW-1:0] sys_host_data,
  output logic        sys_frame_tick,
  output logic [EW-1:0] sys_max [NNODE]
);

  cvp_node #(
    .QDEPTH(QDEPTH), .SDEPTH(SDEPTH), .WCS_DEPTH(WCS_DEPTH), .HASH_N(HASH_N)
  ) u_node (
    .clk, .rst_n,
    .in_wr_en(node_in_wr_en), .in_wr_data(node_in_wr_data), .in_full(node_in_full),
    .out_rd_en(node_out_rd_en), .out_rd_data(node_out_rd_data), .out_empty(node_out_empty),
    .host_wcs_we(node_host_wcs_we), .host_wcs_addr(node_host_wcs_addr),
    .host_wcs_data(node_host_wcs_data), .host_hash_we(node_host_hash_we),
    .host_hash_addr(node_host_hash_addr), .host_hash_data(node_host_hash_data),
    .busy(node_busy), .wait_data(node_wait_data), .wait_space(node_wait_space),
    .done(node_done), .max_o(node_max)
  );

  cvp_systolic #(
    .NNODE(NNODE), .MDEPTH(MDEPTH), .PROG_DEPTH(PROG_DEPTH)
  ) u_sys (
    .clk, .rst_n, .run(sys_run),
    .in_we(sys_in_we), .in_addr(sys_in_addr), .in_data(sys_in_data),
    .out_addr(sys_out_addr), .out_data(sys_out_data),
    .host_we(sys_host_we), .host_addr(sys_host_addr), .host_data(sys_host_data),
    .frame_tick(sys_frame_tick), .max_o(sys_max)
  );

endmodule
