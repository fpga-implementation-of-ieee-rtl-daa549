// fp_ref_pkg: reference model of binary32 add, subtract, multiply, divide and square
// root for the testbenches.
//
// Each operation is computed exactly on wide integers (value = M * 2^E plus a flag
// for a non-zero remainder) and then rounded once by ref_round, which works on the
// exact integer directly: it finds the leading one, decides how many bits to drop,
// and compares the dropped part with one half of the last kept bit. This is a
// different route from the hardware's shift-and-guard-bit scheme, so a mistake in
// one is unlikely to be repeated in the other.
//
// Conventions shared with the design: every invalid operation returns the quiet NaN
// 0x7FC00000; underflow means "inexact and the packed result is subnormal or zero";
// div_zero is raised only for a finite non-zero dividend over zero.
package fp_ref_pkg;

  typedef struct packed {
    logic [31:0] result;
    logic        ine;
    logic        overflow;
    logic        underflow;
    logic        div_zero;
  } ref_t;

  localparam logic [31:0] R_QNAN = 32'h7FC0_0000;

  typedef logic [319:0] big_t;

  function automatic logic r_is_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction
  function automatic logic r_is_inf(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction
  function automatic logic r_is_zero(logic [31:0] x);
    return x[30:0] == 0;
  endfunction
  function automatic int r_exp(logic [31:0] x);   // effective biased exponent
    return (x[30:23] == 0) ? 1 : int'(x[30:23]);
  endfunction
  function automatic logic [23:0] r_mant(logic [31:0] x);
    return {x[30:23] != 0, x[22:0]};
  endfunction

  function automatic ref_t special(logic [31:0] r);
    ref_t o;
    o = '0;
    o.result = r;
    return o;
  endfunction

  // Round (-1)^sign * (m + sticky*epsilon) * 2^e to binary32 with mode rm
  // (0 nearest-even, 1 toward zero, 2 toward +inf, 3 toward -inf).
  function automatic ref_t ref_round(logic sign, big_t m, int e, logic sticky, logic [1:0] rm);
    ref_t o;
    int   p, be, s;
    big_t kept, dropped, half;
    logic gt, eq, inexact, up, normal;
    int   field;
    o = '0;
    if (m == 0 && !sticky) begin
      o.result = {sign, 31'd0};
      return o;
    end
    p = 0;
    for (int i = 0; i < 320; i++) if (m[i]) p = i;
    be = p + e + 127;
    normal = (be >= 1);
    s = normal ? (p - 23) : (-149 - e);
    gt = 0; eq = 0; dropped = 0;
    if (s > 0) begin
      kept    = m >> s;
      dropped = m - (kept << s);
      half    = big_t'(1) << (s - 1);
      gt      = dropped > half;
      eq      = dropped == half;
    end else begin
      kept = m << (-s);
    end
    inexact = (dropped != 0) || sticky;
    case (rm)
      2'd0:    up = gt || (eq && (sticky || kept[0]));
      2'd1:    up = 0;
      2'd2:    up = !sign && inexact;
      default: up = sign && inexact;
    endcase
    kept = kept + big_t'(up);
    if (normal) begin
      if (kept[24]) begin
        kept = kept >> 1;
        be   = be + 1;
      end
      field = be;
    end else begin
      field = kept[23] ? 1 : 0;
    end
    if (field >= 255) begin
      o.overflow = 1;
      o.ine      = 1;
      if (rm == 2'd0 || (rm == 2'd2 && !sign) || (rm == 2'd3 && sign))
        o.result = {sign, 8'hFF, 23'd0};
      else
        o.result = {sign, 8'hFE, 23'h7FFFFF};
      return o;
    end
    o.result    = {sign, 8'(field), kept[22:0]};
    o.ine       = inexact;
    o.underflow = inexact && field == 0;
    return o;
  endfunction

  function automatic ref_t ref_add(logic [31:0] a, logic [31:0] b, logic sub, logic [1:0] rm);
    logic sb, sr;
    big_t ma, mb, mr;
    sb = b[31] ^ sub;
    if (r_is_nan(a) || r_is_nan(b)) return special(R_QNAN);
    if (r_is_inf(a) && r_is_inf(b)) return special((a[31] != sb) ? R_QNAN : {a[31], 8'hFF, 23'd0});
    if (r_is_inf(a)) return special(a);
    if (r_is_inf(b)) return special({sb, 8'hFF, 23'd0});
    ma = big_t'(r_mant(a)) << (r_exp(a) - 1);
    mb = big_t'(r_mant(b)) << (r_exp(b) - 1);
    if (a[31] == sb) begin
      mr = ma + mb; sr = a[31];
    end else if (ma >= mb) begin
      mr = ma - mb; sr = a[31];
    end else begin
      mr = mb - ma; sr = sb;
    end
    if (mr == 0) sr = (a[31] == sb) ? a[31] : (rm == 2'd3);
    return ref_round(sr, mr, -149, 1'b0, rm);
  endfunction

  function automatic ref_t ref_mul(logic [31:0] a, logic [31:0] b, logic [1:0] rm);
    logic s;
    s = a[31] ^ b[31];
    if (r_is_nan(a) || r_is_nan(b)) return special(R_QNAN);
    if ((r_is_inf(a) && r_is_zero(b)) || (r_is_zero(a) && r_is_inf(b))) return special(R_QNAN);
    if (r_is_inf(a) || r_is_inf(b)) return special({s, 8'hFF, 23'd0});
    if (r_is_zero(a) || r_is_zero(b)) return special({s, 31'd0});
    return ref_round(s, big_t'(r_mant(a)) * big_t'(r_mant(b)), r_exp(a) + r_exp(b) - 300, 1'b0, rm);
  endfunction

  function automatic ref_t ref_div(logic [31:0] a, logic [31:0] b, logic [1:0] rm);
    logic s;
    big_t n, d, q, r;
    ref_t o;
    s = a[31] ^ b[31];
    if (r_is_nan(a) || r_is_nan(b)) return special(R_QNAN);
    if ((r_is_inf(a) && r_is_inf(b)) || (r_is_zero(a) && r_is_zero(b))) return special(R_QNAN);
    if (r_is_inf(a)) return special({s, 8'hFF, 23'd0});
    if (r_is_inf(b)) return special({s, 31'd0});
    if (r_is_zero(b)) begin
      o = special({s, 8'hFF, 23'd0});
      o.div_zero = 1;
      return o;
    end
    if (r_is_zero(a)) return special({s, 31'd0});
    n = big_t'(r_mant(a)) << 80;
    d = big_t'(r_mant(b));
    q = n / d;
    r = n - q * d;
    return ref_round(s, q, r_exp(a) - r_exp(b) - 80, r != 0, rm);
  endfunction

  function automatic ref_t ref_sqrt(logic [31:0] a, logic [1:0] rm);
    int   t, k;
    big_t rad, root;
    real  est;
    if (r_is_nan(a)) return special(R_QNAN);
    if (r_is_zero(a)) return special(a);
    if (a[31]) return special(R_QNAN);
    if (r_is_inf(a)) return special(a);
    t = r_exp(a) - 150;
    k = 60 + ((t - 60) & 1);
    rad  = big_t'(r_mant(a)) << k;
    est  = $sqrt(real'(r_mant(a)) * (2.0 ** k));
    root = big_t'(longint'(est));
    while (root * root > rad) root = root - 1;
    while ((root + 1) * (root + 1) <= rad) root = root + 1;
    return ref_round(1'b0, root, (t - k) / 2, root * root != rad, rm);
  endfunction

  // Random operand with a mix of classes: anything, normal numbers near a given
  // exponent, subnormals, and the special encodings.
  function automatic logic [31:0] rand_operand(int near_exp);
    int unsigned sel;
    logic [31:0] x;
    sel = $urandom_range(0, 99);
    x = $urandom;
    if (sel < 30) begin
      // as is: any bit pattern
    end else if (sel < 75) begin
      x[30:23] = 8'(near_exp + $signed($urandom_range(0, 8)) - 4);
    end else if (sel < 83) begin
      x[30:23] = 8'd0;                         // subnormal (or zero)
      if ($urandom_range(0, 3) == 0) x[22:0] = 23'($urandom_range(0, 15));
    end else if (sel < 86) begin
      x[30:0] = 31'd0;                         // zero
    end else if (sel < 89) begin
      x[30:0] = {8'hFF, 23'd0};                // infinity
    end else if (sel < 91) begin
      x[30:0] = {8'hFF, 1'b1, 22'($urandom)};  // quiet NaN
    end else if (sel < 93) begin
      x[30:0] = {8'hFF, 1'b0, 22'($urandom_range(1, 4000))};  // signalling NaN
    end else if (sel < 96) begin
      x[30:23] = 8'($urandom_range(240, 254)); // large
    end else begin
      x[30:23] = 8'($urandom_range(1, 20));    // small
    end
    return x;
  endfunction

endpackage
