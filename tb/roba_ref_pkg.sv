// Reference arithmetic for the testbenches of the RoBA MAC.
//
// Everything here is computed the slow, obvious way, independently of the
// RTL: nearest power of two by comparing distances to every candidate
// (ties go to the larger power), and the approximate products by plain
// multiplication of the rounded values. Operands are up to 64 bits signed;
// products are returned 130 bits wide so nothing overflows.
package roba_ref_pkg;

  typedef logic signed [129:0] wide_t;

  // nearest power of two of m, 0 for m = 0
  function automatic logic [65:0] nearest_pow2(logic [64:0] m);
    logic [65:0] best, cand, d_cur, best_dist;
    if (m == 0) return '0;
    best = 66'd1;
    best_dist = (m > 1) ? 66'(m) - 66'd1 : 66'd1 - 66'(m);
    for (int k = 1; k <= 65; k++) begin
      cand = 66'd1 << k;
      d_cur = (66'(m) > cand) ? 66'(m) - cand : cand - 66'(m);
      if (d_cur <= best_dist) begin
        best = cand;
        best_dist = d_cur;
      end
    end
    return best;
  endfunction

  // magnitude of a 64-bit operand read as signed (tc = 1) or unsigned
  function automatic logic [64:0] magnitude(longint v, bit tc = 1'b1);
    logic signed [64:0] w;
    if (!tc) return {1'b0, 64'(v)};
    w = 65'(v);
    return (w < 0) ? 65'(-w) : 65'(w);
  endfunction

  // approximate product of the modified RoBA multiplier for 64-bit
  // operands, signed (tc = 1) or unsigned (tc = 0)
  // mode 0: Xr*Yr, 1: Xr*Y, 2: (Xr*Y + X*Yr)/2, 3: Xr*Y + X*Yr - Xr*Yr
  // An unsigned Xr*Yr of 2^128 saturates to 2^128 - 1.
  function automatic wide_t roba_product(longint x, longint y, int mode, bit tc = 1'b1);
    wide_t mx, my, xr, yr, t;
    mx = wide_t'(magnitude(x, tc));
    my = wide_t'(magnitude(y, tc));
    xr = wide_t'(nearest_pow2(magnitude(x, tc)));
    yr = wide_t'(nearest_pow2(magnitude(y, tc)));
    case (mode)
      0:       t = xr * yr;
      1:       t = xr * my;
      2:       t = (xr * my + mx * yr) / 2;
      default: t = xr * my + mx * yr - xr * yr;
    endcase
    if (!tc && t >= (wide_t'(1) <<< 128)) t = (wide_t'(1) <<< 128) - 1;
    if (tc && ((x < 0) != (y < 0))) t = -t;
    return t;
  endfunction

  // exact product of two 64-bit operands, signed or unsigned
  function automatic wide_t exact_product(longint x, longint y, bit tc = 1'b1);
    if (tc) return wide_t'(x) * wide_t'(y);
    return wide_t'({1'b0, 64'(x)}) * wide_t'({1'b0, 64'(y)});
  endfunction

  // a random 64-bit value whose significant width is itself random, so that
  // small and large magnitudes of both signs are all exercised
  function automatic longint rand_operand(int unsigned nbits);
    longint v;
    int unsigned w;
    v = {$urandom, $urandom};
    w = 1 + ($urandom % nbits);
    v = v >>> (64 - w);            // sign-extended w-bit value
    return v;
  endfunction

endpackage
