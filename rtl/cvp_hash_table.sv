// cvp_hash_table: process order hash table and tag modify logic.
//
// A block arriving at a node starts with a header whose low TAG_W bits are a
// channel tag. The tag addresses this table; the entry gives the WCS start
// address of the process to run on the block (the "interrupt address"),
// the number of input and output data words the process needs (used by the
// scheduler) and a new tag. The output header is the input header with its
// tag field replaced by the new tag, so the next node downstream can choose
// its own process.
//
// The table is written by the host at any time, also while the node runs.
// Lookup is combinational. Entry layout, table size and the tag-replacement
// rule are this design's choices.
module cvp_hash_table
  import cvp_pkg::*;
  import cvp_node_pkg::*;
#(
  parameter int ENTRIES = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_we,
  input  logic [$clog2(ENTRIES)-1:0] host_addr,
  input  hash_entry_t host_data,
  input  cplx_t       header,
  output hash_entry_t entry,
  output cplx_t       out_header
);

  hash_entry_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (host_we) begin
      tbl[host_addr] <= host_data;
    end
  end

  always_comb begin
    entry      = tbl[header.re[$clog2(ENTRIES)-1:0]];
    out_header = header;
    out_header.re[TAG_W-1:0] = entry.out_tag;
  end

endmodule
