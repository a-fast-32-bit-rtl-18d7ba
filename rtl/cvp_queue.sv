// cvp_queue: biport RAM FIFO used as an input or output queue of a CVP node.
//
// A DEPTH-word circular buffer with separate write and read ports, so the
// outside world and the CVP side can move data in the same clock. The word
// at the head is always visible on rd_data (first-word fall-through), which
// lets the scheduler look at a block header before consuming it. `count`
// and `free` report the fill level to the scheduler.
//
// Both ports are on one clock here; the board's queues are asynchronous
// between the two sides, which this model does not reproduce. Depth and the
// single clock are this design's choices. Writing when full and reading when
// empty are errors, flagged by assertions, and ignored.
module cvp_queue
  import cvp_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  cplx_t wr_data,
  input  logic  rd_en,
  output cplx_t rd_data,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH):0] count,
  output logic [$clog2(DEPTH):0] free
);

  localparam int AB = $clog2(DEPTH);

  cplx_t         mem [DEPTH];
  logic [AB-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AB+1)'(DEPTH));
  assign free  = (AB+1)'(DEPTH) - count;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AB'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AB'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AB+1)'(do_wr) - (AB+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
