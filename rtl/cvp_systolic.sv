// cvp_systolic: four-node systolic CVP board.
//
// Four CVPs form a pipeline: input memory -> CVP 0 -> memory -> CVP 1 ->
// memory -> CVP 2 -> memory -> CVP 3 -> output memory. Every memory is
// double banked (cvp_dbank), so all four CVPs work at once, each on its own
// frame, and a frame moves one node down the pipeline per frame period. A
// typical use is a pipelined radix-4 FFT with one FFT stage per node.
//
// One shared control store holds the frame program. Each word carries, for
// every node, the coefficient for its C/D busses, its multiplier,
// accumulator and output controls, the read address into the memory before
// it and a write address and enable for the memory after it. Once `run` is
// set the sequencer plays the program from address 0 to the word marked
// `last`, then starts again; at that wrap all memories swap banks and
// `frame_tick` pulses. Results still in a CVP's pipeline when the frame ends
// would land in the wrong bank, so a program ends with at least the CVP's
// latency (11 clocks) of words that write nothing new.
//
// The outside world writes a frame into the input memory and reads the
// previous results from the output memory through address ports. The host
// loads the control store at any time. The memory depth, program length and
// word layout are this design's choices; the document gives the four-node
// pipeline, the double-banked memories and the single control store.
module cvp_systolic
  import cvp_pkg::*;
#(
  parameter int NNODE     = 4,
  parameter int MDEPTH    = 4096,
  parameter int PROG_DEPTH = 8192,
  // width of one control store word: per node 64 coefficient bits, the CVP
  // controls, two memory addresses and a write enable; plus the last bit
  localparam int SW = NNODE * (64 + $bits(mul_ctrl_t) + NACC * $bits(acc_op_e) +
                               $bits(mod_ctrl_t) + 2 * $clog2(MDEPTH) + 1) + 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  // frame input
  input  logic  in_we,
  input  logic [$clog2(MDEPTH)-1:0] in_addr,
  input  cplx_t in_data,
  // frame output
  input  logic [$clog2(MDEPTH)-1:0] out_addr,
  output cplx_t out_data,
  // host port to the control store
  input  logic  host_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] host_addr,
  input  logic [SW-1:0] host_data,
  output logic  frame_tick,
  output logic [EW-1:0] max_o [NNODE]
);

  localparam int MA = $clog2(MDEPTH);
  localparam int PA = $clog2(PROG_DEPTH);

  typedef struct packed {
    logic signed [31:0]  coef_re;
    logic signed [31:0]  coef_im;
    mul_ctrl_t           mul;
    acc_op_e [NACC-1:0]  acc_op;
    mod_ctrl_t           modc;
    logic [MA-1:0]       raddr;
    logic [MA-1:0]       waddr;
    logic                we;
  } snode_t;

  typedef struct packed {
    snode_t [NNODE-1:0] node;
    logic               last;
  } sword_t;

  if ($bits(sword_t) != SW) begin : g_width_check
    $error("control word layout does not match SW");
  end

  // control store and sequencer
  sword_t        word_raw, word;
  logic [PA-1:0] pc_q, raddr;
  logic          running_q;

  cvp_wcs #(.DEPTH(PROG_DEPTH), .WIDTH(SW)) u_wcs (
    .clk, .host_we, .host_addr, .host_data(host_data), .raddr, .rdata(word_raw)
  );

  // address pc_q+1 is fetched while word pc_q executes; after `last` the
  // program restarts at 0.
  always_comb begin
    if (!running_q || word_raw.last) raddr = '0;
    else                             raddr = pc_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0;
      pc_q      <= '0;
    end else begin
      if (!running_q) begin
        running_q <= run;
        pc_q      <= '0;
      end else begin
        pc_q <= word_raw.last ? '0 : pc_q + 1'b1;
      end
    end
  end

  assign word       = running_q ? word_raw : '0;
  assign frame_tick = running_q && word_raw.last;

  // memories: mem[0] is the input memory, mem[NNODE] the output memory
  cplx_t rdata [NNODE+1];
  cplx_t zout  [NNODE];
  logic  bank_unused [NNODE+1];

  for (genvar i = 0; i <= NNODE; i++) begin : g_mem
    logic          we;
    logic [MA-1:0] wa, ra;
    cplx_t         wd;
    if (i == 0) begin : g_in
      assign we = in_we;
      assign wa = in_addr;
      assign wd = in_data;
    end else begin : g_link
      assign we = word.node[i-1].we;
      assign wa = word.node[i-1].waddr;
      assign wd = zout[i-1];
    end
    if (i == NNODE) begin : g_out
      assign ra = out_addr;
    end else begin : g_rd
      assign ra = word.node[i].raddr;
    end
    cvp_dbank #(.DEPTH(MDEPTH)) u_mem (
      .clk, .rst_n, .swap(frame_tick), .we, .waddr(wa), .wdata(wd),
      .raddr(ra), .rdata(rdata[i]), .bank(bank_unused[i])
    );
  end

  assign out_data = rdata[NNODE];

  for (genvar i = 0; i < NNODE; i++) begin : g_node
    acc_op_e ops [NACC];
    logic    oe_r, oe_i;
    always_comb for (int k = 0; k < NACC; k++) ops[k] = running_q ? word.node[i].acc_op[k] : ACC_HOLD;
    cvp u_cvp (
      .clk, .rst_n, .a(rdata[i].re), .b(rdata[i].im),
      .c(word.node[i].coef_re), .d(word.node[i].coef_im),
      .mul_ctrl(word.node[i].mul), .acc_op(ops), .mod_ctrl(word.node[i].modc),
      .enrb(1'b0), .enib(1'b0), .zr(zout[i].re), .zi(zout[i].im),
      .zr_oe(oe_r), .zi_oe(oe_i), .max_o(max_o[i])
    );
  end

endmodule
