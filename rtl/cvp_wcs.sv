// cvp_wcs: writeable control store of a CVP node.
//
// DEPTH words of WIDTH-bit microcode (64K x 144 on the board). The host
// downloads code through its write port at power-up and may rewrite it while
// the node runs; the sequencer reads one word per clock through a separate
// read port. The read is synchronous: the address presented in cycle n gives
// the word in cycle n+1, like the serial port of the video DRAM the board
// uses. The DRAM's refresh and row/column timing are not modelled.
module cvp_wcs #(
  parameter int DEPTH = 65536,
  parameter int WIDTH = 144
) (
  input  logic clk,
  input  logic host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic [WIDTH-1:0]         host_data,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_data;
  end

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
  end

endmodule
