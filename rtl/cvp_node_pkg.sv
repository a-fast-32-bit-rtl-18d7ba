// cvp_node_pkg: types shared by the CVP processor boards.
//
// Data words in the queues and scratch memory are complex, 32 bits real and
// 32 bits imaginary (cvp_pkg::cplx_t). The first word of every data block in
// a queue is a header; its low 8 bits (re[7:0]) are the channel tag used to
// choose the process.
//
// The micro-instruction is 144 bits wide, the width of the writeable control
// store. It is horizontal: one word per clock controls the CVP, its data
// sources and the memories directly. The coefficient for the CVP's C/D busses
// is carried in the word itself. The field layout is this design's own.
package cvp_node_pkg;
  import cvp_pkg::*;

  localparam int UW      = 144;  // micro-instruction width
  localparam int WCS_AW  = 16;   // 64K words
  localparam int TAG_W   = 8;    // channel tag bits in a header
  localparam int MADDR_W = 16;   // scratch / queue address fields

  // Source of the CVP's A/B (data) busses.
  typedef enum logic [1:0] {
    SRC_ZERO    = 2'd0,
    SRC_INQ     = 2'd1,   // head of the input queue
    SRC_SCRATCH = 2'd2,   // scratch memory read port
    SRC_ZERO3   = 2'd3
  } src_e;

  typedef struct packed {
    logic [UW-135:0]      spare;     // 10 unused bits
    logic signed [31:0]   coef_re;   // C bus
    logic signed [31:0]   coef_im;   // D bus
    mul_ctrl_t            mul;
    acc_op_e [NACC-1:0]   acc_op;    // acc_op[k] drives accumulator k (0 W .. 3 Z)
    mod_ctrl_t            modc;
    src_e                 src;
    logic                 iq_pop;    // consume the input queue head this clock
    logic [MADDR_W-1:0]   scr_raddr;
    logic [MADDR_W-1:0]   scr_waddr;
    logic                 scr_we;    // write ZR/ZI to scratch at scr_waddr
    logic                 oq_push;   // write ZR/ZI to the output queue
    logic                 last;      // final word of the process
  } uword_t;

  // One entry of the process order hash table.
  typedef struct packed {
    logic [WCS_AW-1:0] start;      // first WCS address of the process
    logic [15:0]       in_words;   // data words the process consumes (after the header)
    logic [15:0]       out_words;  // data words it produces (after the header)
    logic [TAG_W-1:0]  out_tag;    // tag written into the output header
  } hash_entry_t;

endpackage
