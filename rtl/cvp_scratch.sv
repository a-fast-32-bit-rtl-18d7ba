// cvp_scratch: local dual-port scratch memory of a CVP node.
//
// Holds intermediate vectors between passes of a multi-pass process (the
// stages of an FFT, for example): the CVP's output is written back through
// the write port while the read port feeds the CVP's data busses. Like the
// asynchronous biport static RAM it stands for, a read is combinational
// (data follows raddr in the same clock); a write takes effect at the clock
// edge. Reading and writing the same address in one clock returns the old
// word. DEPTH is this design's choice; the document gives none.
module cvp_scratch
  import cvp_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic  clk,
  input  logic  we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  cplx_t wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output cplx_t rdata
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
