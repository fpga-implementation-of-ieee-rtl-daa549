// pre_norm_addsub: pre-normalize stage of the add/subtract unit (one register stage).
//
// Unpacks both operands (subnormals get exponent 1 and no hidden bit), applies the
// subtract op-code by inverting the sign of B, and compares the exponents: when
// e_A > e_B operand A is the "large" one, otherwise B is (as in the addition
// flowchart). The smaller mantissa is shifted right by the exponent difference into
// a 28-bit field laid out as
//     [27] carry  [26] hidden bit  [25:3] fraction  [2] guard  [1] round  [0] sticky
// and every one shifted out past bit 0 is ORed into the sticky bit.
// Outputs are registered when en_i is high; they hold otherwise.
module pre_norm_addsub (
  input  logic        clk_i,
  input  logic        en_i,
  input  logic [31:0] opa_i,
  input  logic [31:0] opb_i,
  input  logic        sub_i,
  output logic [27:0] frac_l_o,    // mantissa of the operand with the larger exponent
  output logic [27:0] frac_s_o,    // aligned mantissa of the other operand
  output logic        sign_l_o,
  output logic        sign_s_o,
  output logic [7:0]  exp_o        // larger (effective) exponent
);
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ma, mb, ml, ms;
  logic        sa, sb, sl, ss;
  logic [7:0]  diff;
  logic [27:0] ms28, ms_shr;
  logic        sticky;

  always_comb begin
    ea = (opa_i[30:23] == 8'd0) ? 8'd1 : opa_i[30:23];
    eb = (opb_i[30:23] == 8'd0) ? 8'd1 : opb_i[30:23];
    ma = {opa_i[30:23] != 8'd0, opa_i[22:0]};
    mb = {opb_i[30:23] != 8'd0, opb_i[22:0]};
    sa = opa_i[31];
    sb = opb_i[31] ^ sub_i;
    if (ea > eb) begin
      el = ea; es = eb; ml = ma; ms = mb; sl = sa; ss = sb;
    end else begin
      el = eb; es = ea; ml = mb; ms = ma; sl = sb; ss = sa;
    end
    diff = el - es;
    ms28 = {1'b0, ms, 3'b000};
    if (diff >= 8'd27) begin
      ms_shr = '0;
      sticky = |ms;
    end else begin
      ms_shr = ms28 >> diff;
      sticky = |(ms28 & ~(28'hFFF_FFFF << diff));
    end
  end

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      frac_l_o <= {1'b0, ml, 3'b000};
      frac_s_o <= {ms_shr[27:1], ms_shr[0] | sticky};
      sign_l_o <= sl;
      sign_s_o <= ss;
      exp_o    <= el;
    end
  end

endmodule
