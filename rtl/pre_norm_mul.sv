// pre_norm_mul: pre-normalize stage of the multiplication unit (one register stage).
//
// Unpacks both operands (subnormals: exponent 1, no hidden bit) and forms the
// exponent of the product as e_A + e_B - bias. The 48-bit product of two 24-bit
// mantissas has its top bit one place above the hidden-bit position, so the exponent
// handed on is that of bit 47: e_A + e_B - 127 + 1. It is kept signed and wide
// (13 bits) so that the post stage can see overflow and underflow.
// Outputs are registered when en_i is high.
module pre_norm_mul (
  input  logic               clk_i,
  input  logic               en_i,
  input  logic [31:0]        opa_i,
  input  logic [31:0]        opb_i,
  output logic [23:0]        fracta_o,
  output logic [23:0]        fractb_o,
  output logic signed [12:0] exp_o
);
  import fpu_pkg::*;

  logic [7:0] ea, eb;

  always_comb begin
    ea = (opa_i[30:23] == 8'd0) ? 8'd1 : opa_i[30:23];
    eb = (opb_i[30:23] == 8'd0) ? 8'd1 : opb_i[30:23];
  end

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      fracta_o <= {opa_i[30:23] != 8'd0, opa_i[22:0]};
      fractb_o <= {opb_i[30:23] != 8'd0, opb_i[22:0]};
      exp_o    <= 13'(ea) + 13'(eb) - 13'(BIAS) + 13'sd1;
    end
  end

endmodule
