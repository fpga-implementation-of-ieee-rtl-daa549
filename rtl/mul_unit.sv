// mul_unit: single-precision multiplication.
//
// pre_norm_mul (exponent sum, one cycle), mul_24 (parallel 24 x 24 multiplier, five
// cycles) and post_norm_mul (normalize, round, special operands, one cycle), as in
// the unit's block diagram. The operands and rmode_i are sampled when start_i is
// high and held inside the unit. ready_o falls on start and rises seven clock cycles
// later together with result_o and status_o; it stays high until the next start.
module mul_unit (
  input  logic                  clk_i,
  input  logic                  start_i,
  input  logic [31:0]           opa_i,
  input  logic [31:0]           opb_i,
  input  fpu_pkg::rmode_e       rmode_i,
  output logic [31:0]           result_o,
  output fpu_pkg::unit_status_t status_o,
  output logic                  ready_o
);
  import fpu_pkg::*;

  logic [31:0]        s_opa, s_opb;
  rmode_e             s_rmode;
  logic               pre_done, core_ready, core_ready_q, core_done;
  logic [23:0]        fracta, fractb;
  logic signed [12:0] exp_p;
  logic [47:0]        prod;

  // first cycle of the multiplier's ready, ignoring a stale level right after start
  assign core_done = core_ready && !core_ready_q && !pre_done;

  always_ff @(posedge clk_i) begin
    if (start_i) begin
      s_opa   <= opa_i;
      s_opb   <= opb_i;
      s_rmode <= rmode_i;
    end
    pre_done     <= start_i;
    core_ready_q <= core_ready;
    if (start_i)        ready_o <= 1'b0;
    else if (core_done) ready_o <= 1'b1;
  end

  pre_norm_mul u_pre (
    .clk_i, .en_i(start_i), .opa_i, .opb_i,
    .fracta_o(fracta), .fractb_o(fractb), .exp_o(exp_p)
  );

  mul_24 u_core (
    .clk_i, .start_i(pre_done), .fracta_i(fracta), .fractb_i(fractb),
    .fract_o(prod), .ready_o(core_ready)
  );

  post_norm_mul u_post (
    .clk_i, .en_i(core_done),
    .opa_i(s_opa), .opb_i(s_opb), .rmode_i(s_rmode),
    .fract_i(prod), .exp_i(exp_p),
    .result_o, .status_o
  );

endmodule
