// pre_norm_sqrt: pre-normalize stage of the square-root unit (one register stage).
//
// Follows the square-root flowchart: count the leading zeros z_A of the 24-bit
// mantissa, append 28 zeros to its right (a 52-bit radicand), shift left by z_A,
// and form the result exponent e_O = (e_A + 127 - z_A) / 2 (subnormals use e_A = 1).
// The halving needs an even unbiased exponent: when e_A - z_A - 127 is even the
// radicand is shifted one more place right, which makes the 26-bit root carry its
// leading one at bit 25 in both cases. That parity step is this design's detail.
// Outputs are registered when en_i is high.
module pre_norm_sqrt (
  input  logic        clk_i,
  input  logic        en_i,
  input  logic [31:0] opa_i,
  output logic [51:0] radicand_o,
  output logic signed [12:0] exp_o
);
  import fpu_pkg::*;

  function automatic logic [4:0] lzc24(input logic [23:0] v);
    lzc24 = 5'd24;
    for (int i = 0; i < 24; i++) begin
      if (v[i]) lzc24 = 5'(23 - i);
    end
  endfunction

  logic [7:0]  ea;
  logic [23:0] ma, mn;
  logic [4:0]  za;
  logic [9:0]  e_sum;       // e_A + 127 - z_A, always positive
  logic        odd;         // unbiased exponent e_A - z_A - 127 is odd

  always_comb begin
    ea    = (opa_i[30:23] == 8'd0) ? 8'd1 : opa_i[30:23];
    ma    = {opa_i[30:23] != 8'd0, opa_i[22:0]};
    za    = lzc24(ma);
    mn    = ma << za;
    e_sum = 10'(ea) + 10'(BIAS) - 10'(za);
    odd   = e_sum[0];       // same parity as e_A - z_A - 127
  end

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      radicand_o <= odd ? {mn, 28'd0} : {1'b0, mn, 27'd0};
      exp_o      <= 13'(e_sum >> 1);
    end
  end

endmodule
