// cvp_dbank: double-banked (ping-pong) biport memory between systolic nodes.
//
// Two banks of DEPTH complex words. The upstream side writes into one bank
// while the downstream side reads the other, so neighbouring nodes work on
// consecutive frames at the same time without waiting for each other. A
// `swap` pulse at a frame boundary exchanges the banks: what was written in
// the last frame becomes readable. Reads are combinational, writes take
// effect at the clock edge. `bank` shows which bank is currently written.
// DEPTH is this design's choice (4096 words holds a 4K-point frame).
module cvp_dbank
  import cvp_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  swap,
  input  logic  we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  cplx_t wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output cplx_t rdata,
  output logic  bank
);

  cplx_t mem0 [DEPTH];
  cplx_t mem1 [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bank <= 1'b0;
    else if (swap) bank <= ~bank;
  end

  always_ff @(posedge clk) begin
    if (we && !bank) mem0[waddr] <= wdata;
    if (we &&  bank) mem1[waddr] <= wdata;
  end

  assign rdata = bank ? mem0[raddr] : mem1[raddr];

endmodule
