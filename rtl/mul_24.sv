// mul_24: arithmetic core of the multiplication unit, a parallel 24 x 24 multiplier
// spread over five clock cycles.
//
// The operands are split into 12-bit halves, a = {ah, al} and b = {bh, bl}, and
//   a*b = ah*bh*2^24 + (ah*bl + al*bh)*2^12 + al*bl.
// Cycle 1 registers the operands, cycle 2 forms the four 12 x 12 partial products in
// parallel, cycle 3 adds the two middle products and places ah*bh and al*bl side by
// side (they do not overlap), cycle 4 adds the shifted middle sum, and cycle 5
// presents the 48-bit product with ready_o. Five cycles from start_i to ready_o is
// the figure the unit is specified with for its parallel multiplier; the split into
// halves is this design's choice. ready_o stays high until the next start.
module mul_24 (
  input  logic        clk_i,
  input  logic        start_i,
  input  logic [23:0] fracta_i,
  input  logic [23:0] fractb_i,
  output logic [47:0] fract_o,
  output logic        ready_o
);
  logic [23:0] s_a, s_b;
  logic [23:0] p_hh, p_hl, p_lh, p_ll;
  logic [24:0] mid;
  logic [47:0] outer;
  logic [47:0] prod;
  logic [3:0]  valid;

  always_ff @(posedge clk_i) begin
    valid <= {valid[2:0], start_i};
    if (start_i) begin
      s_a <= fracta_i;
      s_b <= fractb_i;
    end
    p_hh  <= s_a[23:12] * s_b[23:12];
    p_hl  <= s_a[23:12] * s_b[11:0];
    p_lh  <= s_a[11:0]  * s_b[23:12];
    p_ll  <= s_a[11:0]  * s_b[11:0];
    mid   <= {1'b0, p_hl} + {1'b0, p_lh};
    outer <= {p_hh, p_ll};
    prod  <= outer + {11'd0, mid, 12'd0};
    if (valid[3]) fract_o <= prod;
    if (start_i)       ready_o <= 1'b0;
    else if (valid[3]) ready_o <= 1'b1;
  end

endmodule
