// post_norm_addsub: post-normalize stage of the add/subtract unit (one register stage).
//
// Normalizes and rounds the 28-bit sum through its own fp_round_pack. Bit 26 of the
// sum carries the weight of the larger exponent, so bit 27 (the carry) carries that
// exponent plus one, which is the exponent handed to the rounder. Special operands
// are resolved here from the operands held by the unit:
//   any NaN -> quiet NaN; inf - inf -> quiet NaN; inf +/- finite -> that infinity.
// An exact zero from a true subtraction is +0, or -0 when rounding toward -inf.
// Outputs are registered when en_i is high.
module post_norm_addsub (
  input  logic                 clk_i,
  input  logic                 en_i,
  input  logic [31:0]          opa_i,
  input  logic [31:0]          opb_i,
  input  logic                 sub_i,
  input  fpu_pkg::rmode_e      rmode_i,
  input  logic [27:0]          fract_i,
  input  logic                 sign_i,
  input  logic                 eff_sub_i,
  input  logic [7:0]           exp_i,
  output logic [31:0]          result_o,
  output fpu_pkg::unit_status_t status_o
);
  import fpu_pkg::*;

  logic        sign_r, sb;
  logic [31:0] rp_result, res;
  logic        rp_ine, rp_ovf, rp_unf;
  unit_status_t st;

  always_comb begin
    if (fract_i == '0 && eff_sub_i) sign_r = (rmode_i == RM_DOWN);
    else                            sign_r = sign_i;
  end

  fp_round_pack #(.W(28)) u_round (
    .sign_i     (sign_r),
    .exp_i      (13'(exp_i) + 13'sd1),
    .mant_i     (fract_i),
    .sticky_i   (1'b0),
    .rmode_i    (rmode_i),
    .result_o   (rp_result),
    .ine_o      (rp_ine),
    .overflow_o (rp_ovf),
    .underflow_o(rp_unf)
  );

  always_comb begin
    sb  = opb_i[31] ^ sub_i;
    res = rp_result;
    st  = '{ine: rp_ine, overflow: rp_ovf, underflow: rp_unf, div_zero: 1'b0};
    if (is_nan(opa_i) || is_nan(opb_i)) begin
      res = QNAN;
      st  = '0;
    end else if (is_inf(opa_i) && is_inf(opb_i)) begin
      res = (opa_i[31] != sb) ? QNAN : {opa_i[31], 8'hFF, 23'd0};
      st  = '0;
    end else if (is_inf(opa_i)) begin
      res = opa_i;
      st  = '0;
    end else if (is_inf(opb_i)) begin
      res = {sb, 8'hFF, 23'd0};
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
