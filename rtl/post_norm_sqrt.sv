// post_norm_sqrt: post-normalize stage of the square-root unit (one register stage).
//
// Rounds the 26-bit root through its own fp_round_pack (the remainder is the sticky
// bit; a square root can neither overflow nor underflow). Special operands are
// resolved from the operand held by the unit: NaN or a negative non-zero operand
// (including -inf) -> quiet NaN; +0 and -0 return themselves; +inf -> +inf.
// Outputs are registered when en_i is high.
module post_norm_sqrt (
  input  logic                  clk_i,
  input  logic                  en_i,
  input  logic [31:0]           opa_i,
  input  fpu_pkg::rmode_e       rmode_i,
  input  logic [25:0]           root_i,
  input  logic                  rem_nz_i,
  input  logic signed [12:0]    exp_i,
  output logic [31:0]           result_o,
  output fpu_pkg::unit_status_t status_o
);
  import fpu_pkg::*;

  logic [31:0]  rp_result, res;
  logic         rp_ine, rp_ovf, rp_unf;
  unit_status_t st;

  fp_round_pack #(.W(26)) u_round (
    .sign_i     (1'b0),
    .exp_i      (exp_i),
    .mant_i     (root_i),
    .sticky_i   (rem_nz_i),
    .rmode_i    (rmode_i),
    .result_o   (rp_result),
    .ine_o      (rp_ine),
    .overflow_o (rp_ovf),
    .underflow_o(rp_unf)
  );

  always_comb begin
    res = rp_result;
    st  = '{ine: rp_ine, overflow: rp_ovf, underflow: rp_unf, div_zero: 1'b0};
    if (is_nan(opa_i) || (opa_i[31] && !is_zero(opa_i))) begin
      res = QNAN;
      st  = '0;
    end else if (is_zero(opa_i) || is_inf(opa_i)) begin
      res = opa_i;
      st  = '0;
    end
  end

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      result_o <= res;
      status_o <= st;
    end
  end

endmodule
