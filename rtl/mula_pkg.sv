// Shared types and constants of the floating-point multiply/add unit.
//
// The unit executes IEEE-754 double-precision multiply, add, fused
// multiply-add, conversions and comparisons, 64x64 integer multiplies and a
// few move/immediate operations, all through one four-cycle pipeline.  This
// package holds the operation encoding, the double-precision field layout and
// the err-val status codes that the pipeline modules share.  The operation
// list follows the unit's instruction subset; the 4-bit encoding, the err-val
// word layout and the status codes are this design's own choices.
package mula_pkg;

  localparam int unsigned BIAS   = 1023;  // IEEE double exponent bias
  localparam int unsigned EXP_W  = 11;    // exponent field width
  localparam int unsigned FRAC_W = 52;    // stored fraction width
  localparam int unsigned XEXP_W = 13;    // signed internal exponent width

  typedef enum logic [3:0] {
    OP_FADD   = 4'd0,   // A + B
    OP_FSUB   = 4'd1,   // A - B
    OP_FMUL   = 4'd2,   // A * B
    OP_FMULA  = 4'd3,   // A * B + C, product rounded first
    OP_IMUL   = 4'd4,   // low 64 bits of signed A * B
    OP_HMUL   = 4'd5,   // high 64 bits of signed A * B
    OP_MOV    = 4'd6,   // A
    OP_ITOF   = 4'd7,   // signed integer A to double
    OP_FTOI   = 4'd8,   // double A to signed integer
    OP_FTOIU  = 4'd9,   // double A to unsigned integer
    OP_FLT    = 4'd10,  // A <  B  -> 1 or 0
    OP_FLE    = 4'd11,  // A <= B  -> 1 or 0
    OP_FEQ    = 4'd12,  // A == B  -> 1 or 0
    OP_FNE    = 4'd13,  // A != B  -> 1 or 0
    OP_FIMM   = 4'd14,  // sign-extended 16-bit immediate
    OP_FSHORU = 4'd15   // (A << 16) | immediate
  } op_e;

  // Err-val status codes, placed in bits 63:60 of a generated err-val word.
  typedef enum logic [3:0] {
    ERR_NONE    = 4'd0,
    ERR_INVALID = 4'd1,   // IEEE invalid operation (0*inf, inf-inf, NaN operand)
    ERR_CONVERT = 4'd2    // float-to-integer result out of range
  } err_code_e;

  // Operand on its way to the adder: value = mant / 2^63 * 2^(exp - BIAS).
  typedef struct packed {
    logic                      sign;
    logic signed [XEXP_W-1:0]  exp;
    logic [63:0]               mant;
  } xfp_t;

  // Special-value summary carried down the pipeline beside the datapath.
  typedef struct packed {
    logic nan;   // result is an IEEE NaN: becomes an err-val
    logic inf;   // result is infinite
    logic sign;  // sign of the infinity
  } spec_t;

  function automatic logic is_fp_arith(op_e op);
    return op inside {OP_FADD, OP_FSUB, OP_FMUL, OP_FMULA};
  endfunction

  function automatic logic is_imm_path(op_e op);
    return op inside {OP_MOV, OP_FIMM, OP_FSHORU};
  endfunction

endpackage
