// fpu_pkg: types, constants and small format helpers shared by the
// transprecision FPU (vector datapath, downcast/upcast units, precision
// controller).
//
// Five formats are supported: IEEE double (1x64 per 64-bit word), IEEE single
// (2x32), and three 16-bit formats packed 4x16: IEEE half, bfloat16 and
// DLFloat (1 sign, 6 exponent, 9 fraction bits, bias 31). The exponent and
// fraction widths are those of the published format definitions; DLFloat is
// handled here with the same special-value rules as the IEEE formats, which is
// a choice of this design.
//
// The 16 operations and the 4-bit operation code order follow the table of
// operations of the design; the numeric opcode values are this design's own.
package fpu_pkg;

  typedef enum logic [2:0] {
    FMT_DP = 3'd0,
    FMT_SP = 3'd1,
    FMT_HP = 3'd2,
    FMT_BF = 3'd3,
    FMT_DL = 3'd4
  } fmt_e;

  typedef enum logic [3:0] {
    OP_MUL    = 4'd0,
    OP_ADD    = 4'd1,
    OP_SUB    = 4'd2,
    OP_MADD3  = 4'd3,
    OP_MSUB3  = 4'd4,
    OP_NMADD3 = 4'd5,
    OP_NMSUB3 = 4'd6,
    OP_MADD2  = 4'd7,
    OP_NMADD2 = 4'd8,
    OP_MAX3   = 4'd9,
    OP_MIN3   = 4'd10,
    OP_EQ3    = 4'd11,
    OP_NEQ3   = 4'd12,
    OP_MANT   = 4'd13,
    OP_NEGEXP = 4'd14,
    OP_NOPSHF = 4'd15
  } op_e;

  // Instruction word: base operation plus the format selection (mode_switch).
  typedef struct packed {
    op_e  base_opcode;
    fmt_e mode_switch;
  } instr_t;

  // Exception flags of one result word (ORed over its lanes).
  typedef struct packed {
    logic nv;  // invalid operation
    logic of;  // overflow
    logic uf;  // underflow
    logic nx;  // inexact
  } status_t;

  // Precision-controller behaviour (dc_behav).
  typedef enum logic [1:0] {
    DC_FIXED  = 2'd0,  // DCU bypassed: operands go to the vector FPU as given
    DC_FORCED = 2'd1,  // convert to mode_switch, whatever the range
    DC_RANGE  = 2'd2,  // mode_switch, or the next wider format that does not overflow
    DC_AUTO   = 2'd3   // format chosen from the mantissa analysis
  } dc_behav_e;

  // Sideband that travels with an operation through the vector FPU so that
  // the UCU knows how to upcast and where to put the result lanes.
  typedef struct packed {
    logic       dyn;    // operation issued by the DCU (dynamic precision)
    logic [1:0] group;  // issue group within the set of four operand triples
    logic       last;   // last group of the set
  } tag_t;

  localparam int unsigned NSETS   = 4;        // operand triples per DCU set
  localparam int unsigned NDCU_OP = 3 * NSETS; // twelve double operands

  function automatic int unsigned fmt_ebits(fmt_e f);
    case (f)
      FMT_DP:  return 11;
      FMT_SP:  return 8;
      FMT_HP:  return 5;
      FMT_BF:  return 8;
      default: return 6;
    endcase
  endfunction

  function automatic int unsigned fmt_fbits(fmt_e f);
    case (f)
      FMT_DP:  return 52;
      FMT_SP:  return 23;
      FMT_HP:  return 10;
      FMT_BF:  return 7;
      default: return 9;
    endcase
  endfunction

  function automatic int unsigned fmt_bias(fmt_e f);
    return (1 << (fmt_ebits(f) - 1)) - 1;
  endfunction

  // Number of lanes in a 64-bit word.
  function automatic int unsigned fmt_lanes(fmt_e f);
    case (f)
      FMT_DP:  return 1;
      FMT_SP:  return 2;
      default: return 4;
    endcase
  endfunction

  function automatic logic fmt_is16(fmt_e f);
    return (f != FMT_DP) && (f != FMT_SP);
  endfunction

  // Vector mode as a 2-bit code: 0 = 1x64, 1 = 2x32, 2 = 4x16.
  function automatic logic [1:0] fmt_vmode(fmt_e f);
    case (f)
      FMT_DP:  return 2'd0;
      FMT_SP:  return 2'd1;
      default: return 2'd2;
    endcase
  endfunction

endpackage
