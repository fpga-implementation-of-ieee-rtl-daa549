// fpu_result_mux: output multiplexer of the arithmetic unit (combinational).
//
// The same 3-bit op-code that chose the operation selects which unit's result,
// status and ready bit reach the output: add and subtract share the add/subtract
// unit; multiply, divide and square root have a unit each. An op-code that names no
// operation (101, 110, 111) selects nothing: it reads as ready at once with a zero
// result and no status, so the unit never waits on it. That behaviour is this
// design's choice.
module fpu_result_mux (
  input  fpu_pkg::fpu_op_e      op_i,
  input  logic [31:0]           addsub_result_i,
  input  fpu_pkg::unit_status_t addsub_status_i,
  input  logic                  addsub_ready_i,
  input  logic [31:0]           mul_result_i,
  input  fpu_pkg::unit_status_t mul_status_i,
  input  logic                  mul_ready_i,
  input  logic [31:0]           div_result_i,
  input  fpu_pkg::unit_status_t div_status_i,
  input  logic                  div_ready_i,
  input  logic [31:0]           sqrt_result_i,
  input  fpu_pkg::unit_status_t sqrt_status_i,
  input  logic                  sqrt_ready_i,
  output logic [31:0]           result_o,
  output fpu_pkg::unit_status_t status_o,
  output logic                  ready_o
);
  import fpu_pkg::*;

  always_comb begin
    unique case (op_i)
      OP_ADD, OP_SUB: begin
        result_o = addsub_result_i; status_o = addsub_status_i; ready_o = addsub_ready_i;
      end
      OP_MUL: begin
        result_o = mul_result_i;    status_o = mul_status_i;    ready_o = mul_ready_i;
      end
      OP_DIV: begin
        result_o = div_result_i;    status_o = div_status_i;    ready_o = div_ready_i;
      end
      OP_SQRT: begin
        result_o = sqrt_result_i;   status_o = sqrt_status_i;   ready_o = sqrt_ready_i;
      end
      default: begin
        result_o = '0;              status_o = '0;              ready_o = 1'b1;
      end
    endcase
  end

endmodule
