// tb_ref_pkg: reference arithmetic for the decoder testbenches.
//
// Written separately from the design: GF(2^m) products come from log/antilog tables built
// by stepping an LFSR, transforms from the direct Hadamard sum, and ratios from real
// division. The Q16.13 product keeps the design's documented rounding rule (half away from
// zero, saturation) so that results compare bit for bit.
package tb_ref_pkg;

  function automatic int ref_poly(int m);
    case (m)
      2: return 7; 3: return 11; 4: return 19; 5: return 37; 6: return 67; 7: return 137;
      default: return 285;
    endcase
  endfunction

  // alpha^i by stepping the LFSR i times
  function automatic int ref_exp(int i, int m);
    int r;
    r = 1;
    for (int k = 0; k < i % ((1 << m) - 1); k++) begin
      r = r * 2;
      if (r >= (1 << m)) r = r ^ ref_poly(m);
    end
    return r;
  endfunction

  function automatic int ref_log(int a, int m);
    for (int i = 0; i < (1 << m) - 1; i++) if (ref_exp(i, m) == a) return i;
    return -1;
  endfunction

  function automatic int ref_mul(int a, int b, int m);
    if (a == 0 || b == 0) return 0;
    return ref_exp((ref_log(a, m) + ref_log(b, m)) % ((1 << m) - 1), m);
  endfunction

  function automatic int popcount(int v);
    int c;
    c = 0;
    for (int i = 0; i < 16; i++) c += (v >> i) & 1;
    return c;
  endfunction

  // real value -> Q8.7 integer, rounded half away from zero, saturated
  function automatic int ref_q87(real v);
    real s;
    int  r;
    s = v * 128.0;
    r = (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
    if (r > 127)  r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  // Q16.13 product of two integers in Q16.13 units
  function automatic int ref_mul_q13(int a, int b);
    longint p;
    longint mag;
    p   = longint'(a) * longint'(b);
    mag = (p < 0) ? -p : p;
    mag = (mag + 4096) / 8192;
    p   = (p < 0) ? -mag : mag;
    if (p > 32767)  p = 32767;
    if (p < -32768) p = -32768;
    return int'(p);
  endfunction

  // Q8.7 ratio of two values in the same unit (den > 0)
  function automatic int ref_ratio(int num, int den);
    return ref_q87(real'(num) / real'(den));
  endfunction

  function automatic int sext8(logic [7:0] v);
    return int'($signed(v));
  endfunction

endpackage
