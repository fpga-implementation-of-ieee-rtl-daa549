// fp_round_pack: normalize, round and pack one binary32 result (combinational).
//
// This is the arithmetic heart of every post-normalize stage. Each arithmetic unit
// keeps its own copy, so the units stay independent of each other.
//
// Input value: (-1)^sign_i * mant_i * 2^(exp_i - 127 - (W-1)), plus sticky_i, which
// says that something non-zero lies below the last bit of mant_i. In other words
// exp_i is the biased exponent that bit W-1 of mant_i would carry. mant_i need not
// be normalized and exp_i may be far outside 1..254.
//
// How it works:
//   1. Count the leading zeros of mant_i and shift it left so that its leading one
//      reaches bit W-1, unless that would take the exponent below 1. In that case
//      the value is subnormal: shift only as far as exponent 1 allows, or shift right
//      (collecting lost bits into sticky) when exp_i itself is below 1.
//   2. Keep 24 bits. The next bit is the guard bit; everything below it, together
//      with sticky_i, forms the sticky bit.
//   3. Round according to rmode_i (nearest-even, toward zero, toward +inf, toward
//      -inf). A carry out of the 24 bits renormalizes by one place.
//   4. An exponent of 255 or more is an overflow: the result becomes infinity or the
//      largest finite number, as the rounding direction requires.
// Flags: ine_o when any bit was discarded, overflow_o as above, underflow_o when the
// packed result is subnormal or zero and inexact (tininess after rounding).
//
// The guard/round/sticky scheme and the four modes follow the IEEE 754 description;
// the single generic shifter and the subnormal handling are this design's choice.
module fp_round_pack #(
  parameter int unsigned W = 28          // width of the incoming mantissa, >= 26
) (
  input  logic                 sign_i,
  input  logic signed [12:0]   exp_i,
  input  logic [W-1:0]         mant_i,
  input  logic                 sticky_i,
  input  fpu_pkg::rmode_e      rmode_i,
  output logic [31:0]          result_o,
  output logic                 ine_o,
  output logic                 overflow_o,
  output logic                 underflow_o
);
  import fpu_pkg::*;

  localparam int unsigned XW = 2 * W;

  // Leading-zero count of the incoming mantissa.
  function automatic logic [$clog2(W+1)-1:0] lzc(input logic [W-1:0] v);
    lzc = $clog2(W+1)'(W);
    for (int i = 0; i < W; i++) begin
      if (v[i]) lzc = $clog2(W+1)'(W - 1 - i);
    end
  endfunction

  logic [$clog2(W+1)-1:0] lz;
  logic signed [12:0]     e_norm;     // exponent if fully normalized
  logic signed [12:0]     e_work;     // exponent after the shift
  logic [XW-1:0]          ext, shifted;
  logic                   lost;
  logic [23:0]            keep;
  logic                   guard, rest, up;
  logic [24:0]            rounded;
  logic [23:0]            mant_r;
  logic signed [12:0]     e_r;
  logic [7:0]             exp_field;
  logic                   inexact, ovf;

  always_comb begin
    lz      = lzc(mant_i);
    e_norm  = exp_i - 13'(lz);
    ext     = {mant_i, {W{1'b0}}};
    lost    = 1'b0;
    shifted = ext;
    if (e_norm >= 13'sd1) begin
      // normal: bring the leading one to the top
      e_work  = e_norm;
      shifted = ext << lz;
    end else begin
      // subnormal: the exponent is pinned at 1 (field 0)
      e_work = 13'sd1;
      if (exp_i >= 13'sd1) begin
        shifted = ext << (exp_i - 13'sd1);
      end else if ((13'sd1 - exp_i) >= 13'(XW)) begin
        shifted = '0;
        lost    = |ext;
      end else begin
        shifted = ext >> (13'sd1 - exp_i);
        lost    = |(ext & ~({XW{1'b1}} << (13'sd1 - exp_i)));
      end
    end

    keep  = shifted[XW-1 -: 24];
    guard = shifted[XW-25];
    rest  = (|shifted[XW-26:0]) | lost | sticky_i;

    unique case (rmode_i)
      RM_NEAREST_EVEN: up = guard & (rest | keep[0]);
      RM_TO_ZERO:      up = 1'b0;
      RM_UP:           up = !sign_i & (guard | rest);
      RM_DOWN:         up =  sign_i & (guard | rest);
      default:         up = 1'b0;
    endcase

    rounded = {1'b0, keep} + 25'(up);
    if (rounded[24]) begin
      mant_r = rounded[24:1];
      e_r    = e_work + 13'sd1;
    end else begin
      mant_r = rounded[23:0];
      e_r    = e_work;
    end

    inexact = guard | rest;
    ovf     = mant_r[23] && (e_r >= 13'sd255);

    if (ovf) begin
      // round-to-nearest and rounding away from zero give infinity,
      // the others the largest finite number of the same sign
      if (rmode_i == RM_NEAREST_EVEN ||
          (rmode_i == RM_UP && !sign_i) || (rmode_i == RM_DOWN && sign_i))
        result_o = {sign_i, 8'hFF, 23'd0};
      else
        result_o = {sign_i, 8'hFE, {23{1'b1}}};
      exp_field = 8'hFF;
    end else begin
      exp_field = mant_r[23] ? e_r[7:0] : 8'd0;
      result_o  = {sign_i, exp_field, mant_r[22:0]};
    end

    ine_o       = inexact | ovf;
    overflow_o  = ovf;
    underflow_o = inexact && !ovf && (exp_field == 8'd0);
  end

endmodule
