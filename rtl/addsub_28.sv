// addsub_28: arithmetic core of the add/subtract unit (one register stage).
//
// Adds the two aligned 28-bit mantissas when their signs agree. When they differ it
// subtracts the smaller magnitude from the larger, so the 28-bit result is always a
// magnitude, and the result takes the sign of the larger one. eff_sub_o tells the
// post-normalize stage that an exact zero came from a true subtraction (its sign
// then depends on the rounding mode). Outputs are registered when en_i is high.
module addsub_28 (
  input  logic        clk_i,
  input  logic        en_i,
  input  logic [27:0] frac_l_i,
  input  logic [27:0] frac_s_i,
  input  logic        sign_l_i,
  input  logic        sign_s_i,
  input  logic [7:0]  exp_i,
  output logic [27:0] fract_o,
  output logic        sign_o,
  output logic        eff_sub_o,
  output logic [7:0]  exp_o
);
  logic [27:0] f;
  logic        s, eff_sub;

  always_comb begin
    eff_sub = sign_l_i ^ sign_s_i;
    if (!eff_sub) begin
      f = frac_l_i + frac_s_i;
      s = sign_l_i;
    end else if (frac_l_i >= frac_s_i) begin
      f = frac_l_i - frac_s_i;
      s = sign_l_i;
    end else begin
      f = frac_s_i - frac_l_i;
      s = sign_s_i;
    end
  end

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      fract_o   <= f;
      sign_o    <= s;
      eff_sub_o <= eff_sub;
      exp_o     <= exp_i;
    end
  end

endmodule
