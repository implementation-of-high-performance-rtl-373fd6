// Reference arithmetic for the DA FIR testbenches, written independently of
// the RTL: it multiplies instead of looking up tables.
//
//   plane_sum(b)   = (sum_i coef[i] * bit_b(x[i])) mod 2^lut_w
//   da_out         = (sum_b plane_sum(b) * 2^b)   mod 2^out_w
//   exact_out      =  sum_i coef[i] * x[i]
//
// x[i] is the sample i clocks old. With lut_w and out_w wide enough, da_out
// equals exact_out; with the narrow widths of the published filters the
// difference shows where a sum wrapped.
package da_ref_pkg;

  typedef longint unsigned u64_t;
  typedef u64_t vec_t [$];

  function automatic u64_t mask(int unsigned w);
    return (w >= 64) ? '1 : ((u64_t'(1) << w) - 1);
  endfunction

  function automatic u64_t plane_sum(vec_t coef, vec_t x, int unsigned b, int unsigned lut_w);
    u64_t s = 0;
    foreach (coef[i]) s += coef[i] * ((x[i] >> b) & 1);
    return s & mask(lut_w);
  endfunction

  function automatic u64_t plane_sum_raw(vec_t coef, vec_t x, int unsigned b);
    u64_t s = 0;
    foreach (coef[i]) s += coef[i] * ((x[i] >> b) & 1);
    return s;
  endfunction

  function automatic u64_t da_out(vec_t coef, vec_t x, int unsigned data_w,
                                  int unsigned lut_w, int unsigned out_w);
    u64_t s = 0;
    for (int unsigned b = 0; b < data_w; b++) s += plane_sum(coef, x, b, lut_w) * (u64_t'(1) << b);
    return s & mask(out_w);
  endfunction

  function automatic u64_t exact_out(vec_t coef, vec_t x);
    u64_t s = 0;
    foreach (coef[i]) s += coef[i] * x[i];
    return s;
  endfunction

endpackage
