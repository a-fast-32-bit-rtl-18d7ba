// cvp_pkg: types and constants shared by the Complex Vector Processor (CVP)
// and the boards built around it.
//
// The CVP works on 32-bit two's complement complex data. The multiplier
// delivers 33-bit products (one guard bit for the sum of two products), the
// accumulators hold 40 bits per component, and the output busses are 32 bits.
// These widths are the ones printed on the chip's block diagram. The operation
// encoding of the accumulators and the fields of the control words are this
// design's own choice; the list of accumulator operations follows the
// published operation table.
package cvp_pkg;

  localparam int DW   = 32;  // input / output bus width
  localparam int PW   = 33;  // product width out of the multiplier
  localparam int AW   = 40;  // accumulator width
  localparam int NACC = 4;   // accumulators W, X, Y, Z
  localparam int EW   = 4;   // exponent width to the gain monitor (MAX)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [PW-1:0] re;
    logic signed [PW-1:0] im;
  } prod_t;

  typedef struct packed {
    logic signed [AW-1:0] re;
    logic signed [AW-1:0] im;
  } acc_t;

  // Complex accumulator operations. S is the new accumulator value, s the
  // previous one, t the value arriving from the product pipeline.
  typedef enum logic [4:0] {
    ACC_HOLD     = 5'd0,   // S = s
    ACC_CLEAR    = 5'd1,   // S = 0
    ACC_LOAD     = 5'd2,   // S = t
    ACC_LOADJ    = 5'd3,   // S = j*t
    ACC_CONJ     = 5'd4,   // S = conj(t)
    ACC_JCONJ    = 5'd5,   // S = j*conj(t)
    ACC_NEG      = 5'd6,   // S = -t
    ACC_NEGJ     = 5'd7,   // S = -j*t
    ACC_NEGCONJ  = 5'd8,   // S = -conj(t)
    ACC_NEGJCONJ = 5'd9,   // S = -j*conj(t)
    ACC_ADD      = 5'd10,  // S = s + t
    ACC_ADDJ     = 5'd11,  // S = s + j*t
    ACC_ADDCONJ  = 5'd12,  // S = s + conj(t)
    ACC_ADDJCONJ = 5'd13,  // S = s + j*conj(t)
    ACC_SUB      = 5'd14,  // S = s - t
    ACC_SUBJ     = 5'd15,  // S = s - j*t
    ACC_SUBCONJ  = 5'd16,  // S = s - conj(t)
    ACC_SUBJCONJ = 5'd17   // S = s - j*conj(t)
  } acc_op_e;

  // Multiplier controls.
  typedef struct packed {
    logic integer_mode;  // 1: integer, 0: fractional (Q1.31) arithmetic
    logic dual_real;     // 1: two real products re=A*C, im=B*D
  } mul_ctrl_t;

  // Output path modes of the modulus extraction block.
  typedef enum logic [1:0] {
    MOD_PASS    = 2'd0,  // pass the selected complex value
    MOD_MODULUS = 2'd1,  // ZR = |z| (approximation), ZI = 0
    MOD_ABS     = 2'd2,  // ZR = |re|, ZI = |im| (dual channel real)
    MOD_PASS3   = 2'd3   // same as MOD_PASS
  } mod_mode_e;

  // Selection, gain and modulus controls.
  typedef struct packed {
    logic [1:0]  sel;     // accumulator to output: 0 W, 1 X, 2 Y, 3 Z
    logic [3:0]  shift;   // right shift applied before saturation to 32 bits
    mod_mode_e   mode;
    logic        gm_en;   // include this output in the gain monitor
    logic        gm_clr;  // restart the gain monitor
  } mod_ctrl_t;

  // Saturate a wide signed value to N bits.
  function automatic logic signed [63:0] sat_to(input logic signed [127:0] v, input int n);
    logic signed [127:0] hi, lo;
    hi = (128'sd1 <<< (n - 1)) - 128'sd1;
    lo = -(128'sd1 <<< (n - 1));
    if (v > hi) return hi[63:0];
    if (v < lo) return lo[63:0];
    return v[63:0];
  endfunction

endpackage
