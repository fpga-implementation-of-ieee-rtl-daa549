// fpu_exceptions: the "trigger exceptions" block of the arithmetic unit
// (combinational).
//
// Produces the eight exception outputs from the selected result, the operands and
// the status of the unit that computed it:
//   ine, overflow, underflow, div_zero  passed on from the unit's status
//   inf    the result is +-infinity, however it arose
//   zero   the result is +-0, however it arose
//   qnan   the result is a NaN (every invalid operation returns a quiet NaN)
//   snan   an operand the operation reads is a signalling NaN (square root reads
//          only operand A)
// The split between what a unit reports and what is read off the result is this
// design's choice; the meaning of each exception follows the IEEE 754 description
// plus the two extra "infinity" and "zero" indications.
module fpu_exceptions (
  input  fpu_pkg::fpu_op_e      op_i,
  input  logic [31:0]           opa_i,
  input  logic [31:0]           opb_i,
  input  logic [31:0]           result_i,
  input  fpu_pkg::unit_status_t status_i,
  output fpu_pkg::fpu_exc_t     exc_o
);
  import fpu_pkg::*;

  always_comb begin
    exc_o.ine       = status_i.ine;
    exc_o.overflow  = status_i.overflow;
    exc_o.underflow = status_i.underflow;
    exc_o.div_zero  = status_i.div_zero;
    exc_o.inf       = is_inf(result_i);
    exc_o.zero      = is_zero(result_i);
    exc_o.qnan      = is_nan(result_i);
    exc_o.snan      = is_snan(opa_i) || (op_i != OP_SQRT && is_snan(opb_i));
  end

endmodule
