// fpu_pkg: types and constants shared by the single-precision arithmetic unit.
//
// Holds the IEEE 754 binary32 field widths, the 3-bit operation codes, the 2-bit
// rounding-mode codes, the status bundle that every arithmetic unit reports, the
// eight-bit exception bundle of the top, and small classification helpers
// (NaN, signalling NaN, infinity, zero) used by the units and the exception logic.
//
// Operation codes 000 (add), 001 (sub), 011 (div) and 100 (sqrt) are the ones the
// unit is specified with; 010 for multiply fills the remaining gap. The rounding
// codes follow the order in which the four IEEE modes are usually listed
// (nearest-even, toward zero, toward +inf, toward -inf); that encoding is this
// design's choice.
package fpu_pkg;

  localparam int unsigned BIAS   = 127;

  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,
    OP_SUB  = 3'b001,
    OP_MUL  = 3'b010,
    OP_DIV  = 3'b011,
    OP_SQRT = 3'b100
  } fpu_op_e;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'b00,
    RM_TO_ZERO      = 2'b01,
    RM_UP           = 2'b10,   // toward +infinity
    RM_DOWN         = 2'b11    // toward -infinity
  } rmode_e;

  // Canonical quiet NaN produced by every invalid operation.
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Status reported by each arithmetic unit together with its result.
  typedef struct packed {
    logic ine;        // result was rounded
    logic overflow;   // finite result too large for the format
    logic underflow;  // tiny after rounding and inexact
    logic div_zero;   // finite non-zero dividend divided by zero
  } unit_status_t;

  // The eight exception outputs of the arithmetic unit.
  typedef struct packed {
    logic ine;
    logic overflow;
    logic underflow;
    logic div_zero;
    logic inf;
    logic zero;
    logic qnan;
    logic snan;
  } fpu_exc_t;

  function automatic logic is_nan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != '0);
  endfunction

  function automatic logic is_snan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != '0) && !x[22];
  endfunction

  function automatic logic is_inf(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == '0);
  endfunction

  function automatic logic is_zero(input logic [31:0] x);
    return x[30:0] == '0;
  endfunction

endpackage
