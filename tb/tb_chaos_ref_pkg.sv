// tb_chaos_ref_pkg: reference model of the generator's arithmetic for the
// testbenches. It recomputes every quantity with plain integer operators (no
// adder or multiplier cells): 20-bit wrap-around sums, full 64-bit products cut
// back to 20 bits (shift right 12, keep the sign bit), the 0.1*ln(w) table from
// its formula, and one whole iteration of the difference equations.
package tb_chaos_ref_pkg;
  import chaos_pkg::*;

  function automatic fix_t r_mul(fix_t x, fix_t y);
    longint p;
    p = longint'(x) * longint'(y);
    return {p[39], p[30:12]};
  endfunction

  function automatic int r_round(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  // 0.1*ln(w) as the table gives it: w = 2^(p-12) * (1 + m/64 + ...).
  function automatic fix_t r_ln01(fix_t w);
    int mag, p, m;
    mag = (w <= 0) ? 1 : int'(w);
    p = 0;
    while ((mag >> (p + 1)) != 0) p++;
    m = int'(((longint'(mag) << 18) >> p) >> 12);   // 6 bits below the leading one
    m = m & 63;
    return fix_t'(r_round(0.1 * real'(p - 12) * $ln(2.0) * 4096.0) +
                  r_round(0.1 * $ln(1.0 + (real'(m) + 0.5) / 64.0) * 4096.0));
  endfunction

  function automatic real to_real(fix_t x);
    return real'(x) / 4096.0;
  endfunction

  function automatic fix_t to_fix(real x);
    return fix_t'(r_round(x * 4096.0));
  endfunction

  function automatic fix_t r_u_next(fix_t u, fix_t v, fix_t w, fix_t h);
    fix_t hh;
    hh = h >>> 1;
    return u - r_mul(v + w, h + r_mul(h, hh));
  endfunction

  function automatic fix_t r_kv(fix_t u, fix_t v, fix_t w, fix_t a, fix_t h);
    fix_t hh;
    hh = h >>> 1;
    return r_mul(u + r_mul(v, a) + r_mul(u, r_ln01(w)), hh);
  endfunction

  function automatic fix_t r_v_next(fix_t u, fix_t v, fix_t w, fix_t a, fix_t h);
    fix_t hh, kv;
    hh = h >>> 1;
    kv = r_kv(u, v, w, a, h);
    return v + (kv + r_mul((kv + u) + r_mul(kv + v, a), hh));
  endfunction

  function automatic fix_t r_kw(fix_t u, fix_t w, fix_t b, fix_t c, fix_t h);
    fix_t hh;
    hh = h >>> 1;
    return r_mul(r_mul(w, u - b) + c, hh);
  endfunction

  function automatic fix_t r_w_next(fix_t u, fix_t w, fix_t b, fix_t c, fix_t h);
    fix_t hh, kw;
    hh = h >>> 1;
    kw = r_kw(u, w, b, c, h);
    return w + (kw + r_mul(r_mul(w + kw, (kw + u) - b) + c, hh));
  endfunction
endpackage
