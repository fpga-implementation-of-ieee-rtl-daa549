// addsub_unit: single-precision addition and subtraction.
//
// Three register stages in a row, as in the unit's block diagram:
//   pre_norm_addsub  exponent compare, swap, alignment with guard/round/sticky
//   addsub_28        add or subtract the aligned 28-bit mantissas
//   post_norm_addsub normalize, round in the selected mode, special operands
// Interface: the operands, sub_i (1 for A - B) and rmode_i are sampled on the cycle
// start_i is high and held by the unit. ready_o falls on start and rises three clock
// cycles later, when result_o and status_o are valid; it stays high until the next
// start. A start while busy restarts the operation.
module addsub_unit (
  input  logic                  clk_i,
  input  logic                  start_i,
  input  logic [31:0]           opa_i,
  input  logic [31:0]           opb_i,
  input  logic                  sub_i,
  input  fpu_pkg::rmode_e       rmode_i,
  output logic [31:0]           result_o,
  output fpu_pkg::unit_status_t status_o,
  output logic                  ready_o
);
  import fpu_pkg::*;

  localparam int unsigned LATENCY = 3;

  logic [31:0] s_opa, s_opb;
  logic        s_sub;
  rmode_e      s_rmode;
  logic [LATENCY-2:0] valid;   // stage done flags: pre, core

  logic [27:0] frac_l, frac_s, fract;
  logic        sign_l, sign_s, sign_c, eff_sub;
  logic [7:0]  exp_p, exp_c;

  always_ff @(posedge clk_i) begin
    if (start_i) begin
      s_opa   <= opa_i;
      s_opb   <= opb_i;
      s_sub   <= sub_i;
      s_rmode <= rmode_i;
    end
    valid <= {valid[0], start_i};
    if (start_i)                ready_o <= 1'b0;
    else if (valid[LATENCY-2])  ready_o <= 1'b1;   // with the post stage
  end

  pre_norm_addsub u_pre (
    .clk_i, .en_i(start_i), .opa_i, .opb_i, .sub_i,
    .frac_l_o(frac_l), .frac_s_o(frac_s), .sign_l_o(sign_l), .sign_s_o(sign_s),
    .exp_o(exp_p)
  );

  addsub_28 u_core (
    .clk_i, .en_i(valid[0]),
    .frac_l_i(frac_l), .frac_s_i(frac_s), .sign_l_i(sign_l), .sign_s_i(sign_s),
    .exp_i(exp_p),
    .fract_o(fract), .sign_o(sign_c), .eff_sub_o(eff_sub), .exp_o(exp_c)
  );

  post_norm_addsub u_post (
    .clk_i, .en_i(valid[1]),
    .opa_i(s_opa), .opb_i(s_opb), .sub_i(s_sub), .rmode_i(s_rmode),
    .fract_i(fract), .sign_i(sign_c), .eff_sub_i(eff_sub), .exp_i(exp_c),
    .result_o, .status_o
  );

endmodule
