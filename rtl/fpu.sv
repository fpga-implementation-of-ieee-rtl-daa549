// fpu: IEEE 754 single-precision arithmetic unit (top level).
//
// Five operations on 32-bit operands, chosen by a 3-bit op-code:
//   000 add, 001 subtract, 010 multiply, 011 divide, 100 square root (operand A).
// A 2-bit code chooses the rounding: 00 nearest-even, 01 toward zero, 10 toward
// +infinity, 11 toward -infinity.
//
// Each operation has its own independent unit (pre-normalize, arithmetic core,
// post-normalize); add and subtract share one. start_i is also the unit's reset:
// on the cycle it is high the op-code, rounding mode and operands are taken, the
// chosen unit is started, ready_o drops and the controller goes busy; a start while
// busy abandons the running operation and begins the new one. The op-code then
// steers the output multiplexer; when the selected unit reports ready, the result
// and the eight exception bits are registered on the outputs, ready_o rises and
// stays high until the next start.
//
// Timing, counted in rising clock edges from the one that samples start_i to the
// one after which ready_o is high: add/sub 4, multiply 8, divide 31, square root 30.
// An unused op-code (101-111) completes after 2 edges with a zero result.
// There is no separate reset input; outputs are undefined until the first start.
//
// Parameters EN_ADDSUB, EN_MUL, EN_DIV and EN_SQRT (all 1 by default) leave a unit
// out to save logic, as the unit's description allows because the units are
// independent. The op-codes of a unit that is left out then behave like the unused
// op-codes: they complete after 2 edges with a zero result. The parameters are this
// design's way of doing that; the description does it by editing the multiplexer.
module fpu #(
  parameter bit EN_ADDSUB = 1'b1,   // build the add/subtract unit
  parameter bit EN_MUL    = 1'b1,   // build the multiply unit
  parameter bit EN_DIV    = 1'b1,   // build the divide unit
  parameter bit EN_SQRT   = 1'b1    // build the square-root unit
) (
  input  logic        clk_i,
  input  logic [31:0] opa_i,
  input  logic [31:0] opb_i,
  input  logic [2:0]  fpu_op_i,
  input  logic [1:0]  rmode_i,
  input  logic        start_i,
  output logic [31:0] output_o,
  output logic        ready_o,
  output logic        ine_o,
  output logic        overflow_o,
  output logic        underflow_o,
  output logic        div_zero_o,
  output logic        inf_o,
  output logic        zero_o,
  output logic        qnan_o,
  output logic        snan_o
);
  import fpu_pkg::*;

  typedef enum logic {WAITING, BUSY} state_e;

  fpu_op_e     op_in;
  rmode_e      rm_in;
  state_e      s_state;
  fpu_op_e     s_op;
  logic [31:0] s_opa, s_opb;

  logic [31:0]  as_res, mu_res, dv_res, sq_res, mux_res;
  unit_status_t as_st,  mu_st,  dv_st,  sq_st,  mux_st;
  logic         as_rdy, mu_rdy, dv_rdy, sq_rdy, mux_rdy;
  fpu_exc_t     exc;

  assign op_in = fpu_op_e'(fpu_op_i);
  assign rm_in = rmode_e'(rmode_i);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk_i) begin
    if (start_i) begin
      s_op    <= op_in;
      s_opa   <= opa_i;
      s_opb   <= opb_i;
      s_state <= BUSY;
      ready_o <= 1'b0;
    end else if (s_state == BUSY && mux_rdy) begin
      output_o    <= mux_res;
      ine_o       <= exc.ine;
      overflow_o  <= exc.overflow;
      underflow_o <= exc.underflow;
      div_zero_o  <= exc.div_zero;
      inf_o       <= exc.inf;
      zero_o      <= exc.zero;
      qnan_o      <= exc.qnan;
      snan_o      <= exc.snan;
      ready_o     <= 1'b1;
      s_state     <= WAITING;
    end
  end

  // ---------------------------------------------------------------- units
  // A unit that is left out reads as always ready with a zero result and no status.
  if (EN_ADDSUB) begin : g_addsub
    addsub_unit i_addsub (
      .clk_i, .start_i(start_i && (op_in == OP_ADD || op_in == OP_SUB)),
      .opa_i, .opb_i, .sub_i(op_in == OP_SUB), .rmode_i(rm_in),
      .result_o(as_res), .status_o(as_st), .ready_o(as_rdy)
    );
  end else begin : g_no_addsub
    assign as_res = '0;
    assign as_st  = '0;
    assign as_rdy = 1'b1;
  end

  if (EN_MUL) begin : g_mul
    mul_unit i_mul (
      .clk_i, .start_i(start_i && op_in == OP_MUL),
      .opa_i, .opb_i, .rmode_i(rm_in),
      .result_o(mu_res), .status_o(mu_st), .ready_o(mu_rdy)
    );
  end else begin : g_no_mul
    assign mu_res = '0;
    assign mu_st  = '0;
    assign mu_rdy = 1'b1;
  end

  if (EN_DIV) begin : g_div
    div_unit i_div (
      .clk_i, .start_i(start_i && op_in == OP_DIV),
      .opa_i, .opb_i, .rmode_i(rm_in),
      .result_o(dv_res), .status_o(dv_st), .ready_o(dv_rdy)
    );
  end else begin : g_no_div
    assign dv_res = '0;
    assign dv_st  = '0;
    assign dv_rdy = 1'b1;
  end

  if (EN_SQRT) begin : g_sqrt
    sqrt_unit i_sqrt (
      .clk_i, .start_i(start_i && op_in == OP_SQRT),
      .opa_i, .rmode_i(rm_in),
      .result_o(sq_res), .status_o(sq_st), .ready_o(sq_rdy)
    );
  end else begin : g_no_sqrt
    assign sq_res = '0;
    assign sq_st  = '0;
    assign sq_rdy = 1'b1;
  end

  // ---------------------------------------------------------------- output
  fpu_result_mux i_mux (
    .op_i(s_op),
    .addsub_result_i(as_res), .addsub_status_i(as_st), .addsub_ready_i(as_rdy),
    .mul_result_i(mu_res),    .mul_status_i(mu_st),    .mul_ready_i(mu_rdy),
    .div_result_i(dv_res),    .div_status_i(dv_st),    .div_ready_i(dv_rdy),
    .sqrt_result_i(sq_res),   .sqrt_status_i(sq_st),   .sqrt_ready_i(sq_rdy),
    .result_o(mux_res), .status_o(mux_st), .ready_o(mux_rdy)
  );

  fpu_exceptions i_exc (
    .op_i(s_op), .opa_i(s_opa), .opb_i(s_opb),
    .result_i(mux_res), .status_i(mux_st), .exc_o(exc)
  );

  // ---------------------------------------------------------------- checks
  // ready_o drops on the cycle after a start, and only a busy controller may
  // raise it.
  a_ready_low_after_start: assert property (@(posedge clk_i) start_i |=> !ready_o);
  a_ready_rises_from_busy: assert property (@(posedge clk_i)
      !start_i && !ready_o ##1 ready_o |-> $past(s_state == BUSY));

endmodule
