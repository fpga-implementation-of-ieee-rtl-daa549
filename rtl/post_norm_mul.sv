// post_norm_mul: post-normalize stage of the multiplication unit (one register stage).
//
// Normalizes and rounds the 48-bit product through its own fp_round_pack, which also
// handles products that fall into the subnormal range or overflow. Special operands
// are resolved from the operands held by the unit:
//   any NaN -> quiet NaN; 0 x inf -> quiet NaN; inf x finite -> infinity;
//   0 x finite -> zero. The sign is always sign_A xor sign_B.
// Outputs are registered when en_i is high.
module post_norm_mul (
  input  logic                  clk_i,
  input  logic                  en_i,
  input  logic [31:0]           opa_i,
  input  logic [31:0]           opb_i,
  input  fpu_pkg::rmode_e       rmode_i,
  input  logic [47:0]           fract_i,
  input  logic signed [12:0]    exp_i,
  output logic [31:0]           result_o,
  output fpu_pkg::unit_status_t status_o
);
  import fpu_pkg::*;

  logic         sign;
  logic [31:0]  rp_result, res;
  logic         rp_ine, rp_ovf, rp_unf;
  unit_status_t st;

  assign sign = opa_i[31] ^ opb_i[31];

  fp_round_pack #(.W(48)) u_round (
    .sign_i     (sign),
    .exp_i      (exp_i),
    .mant_i     (fract_i),
    .sticky_i   (1'b0),
    .rmode_i    (rmode_i),
    .result_o   (rp_result),
    .ine_o      (rp_ine),
    .overflow_o (rp_ovf),
    .underflow_o(rp_unf)
  );

  always_comb begin
    res = rp_result;
    st  = '{ine: rp_ine, overflow: rp_ovf, underflow: rp_unf, div_zero: 1'b0};
    if (is_nan(opa_i) || is_nan(opb_i) ||
        (is_inf(opa_i) && is_zero(opb_i)) || (is_zero(opa_i) && is_inf(opb_i))) begin
      res = QNAN;
      st  = '0;
    end else if (is_inf(opa_i) || is_inf(opb_i)) begin
      res = {sign, 8'hFF, 23'd0};
      st  = '0;
    end else if (is_zero(opa_i) || is_zero(opb_i)) begin
      res = {sign, 31'd0};
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
