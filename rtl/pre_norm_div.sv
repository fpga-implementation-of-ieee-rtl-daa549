// pre_norm_div: pre-normalize stage of the division unit (one register stage).
//
// Counts the leading zeros z_A, z_B of both 24-bit mantissas (non-zero only for
// subnormal operands), shifts each mantissa left by its count so that both start
// with a one, and forms the quotient exponent as the division flowchart gives it:
//     e_O = e_A - e_B + 127 - z_A + z_B
// (subnormal operands use exponent 1). e_O is the exponent of the integer bit of
// the quotient mantissa. It is signed and wide so that overflow and underflow stay
// visible. Outputs are registered when en_i is high.
module pre_norm_div (
  input  logic               clk_i,
  input  logic               en_i,
  input  logic [31:0]        opa_i,
  input  logic [31:0]        opb_i,
  output logic [23:0]        dvdnd_o,
  output logic [23:0]        dvsor_o,
  output logic signed [12:0] exp_o
);
  import fpu_pkg::*;

  function automatic logic [4:0] lzc24(input logic [23:0] v);
    lzc24 = 5'd24;
    for (int i = 0; i < 24; i++) begin
      if (v[i]) lzc24 = 5'(23 - i);
    end
  endfunction

  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [4:0]  za, zb;

  always_comb begin
    ea = (opa_i[30:23] == 8'd0) ? 8'd1 : opa_i[30:23];
    eb = (opb_i[30:23] == 8'd0) ? 8'd1 : opb_i[30:23];
    ma = {opa_i[30:23] != 8'd0, opa_i[22:0]};
    mb = {opb_i[30:23] != 8'd0, opb_i[22:0]};
    za = lzc24(ma);
    zb = lzc24(mb);
  end

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      dvdnd_o <= ma << za;
      dvsor_o <= mb << zb;
      exp_o   <= 13'(ea) - 13'(eb) + 13'(BIAS) - 13'(za) + 13'(zb);
    end
  end

endmodule
