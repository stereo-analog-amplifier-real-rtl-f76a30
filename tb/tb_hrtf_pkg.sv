// tb_hrtf_pkg: reference arithmetic and synthetic data shared by the
// testbenches of the spatializer.
//
// coef_value() gives a synthetic head-related impulse response for an
// (azimuth index, elevation index, ear, tap): a main impulse whose tap and
// gain depend on the angle and the ear, plus a low-level pseudo-random tail.
// For elevation 3 a second impulse of the same gain follows the first, so
// loud input saturates the output there. adc_word() gives the test signal:
// a pseudo-random 24-bit word scaled to 1/8 of full scale, or full scale
// when loud is set. ref_out() is the independent model of filter + output
// stage: the full sum of products in 64-bit arithmetic, then the shift by
// the coefficient's 15 fraction bits plus the normalising shift, then
// saturation to 24 bits.
package tb_hrtf_pkg;

  function automatic int unsigned mix(input int unsigned v);
    int unsigned h;
    h = v * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return h;
  endfunction

  function automatic int coef_value(input int az, input int el, input int ch, input int k);
    int d, g, r;
    d = (ch == 0) ? (az % 18) : ((71 - az) % 18);
    g = 12000 + 1500 * el + ((ch == 1) ? az * 40 : 0);
    if (el == 3) g = 30000;
    r = int'(mix(az * 1031 + el * 131 + ch * 17 + k * 7 + 1) % 512) - 256;
    if (k == d) return g + r;
    if (el == 3 && k == d + 1) return g + r;
    return r;
  endfunction

  function automatic int adc_word(input int unsigned n, input int ch, input bit loud);
    int v, lo;
    v = int'(mix(n * 2 + ch + 77) & 32'hFFFFFF);
    if (v >= 8388608) v = v - 16777216;          // 24-bit signed
    lo = v & 1023;
    if (!loud)  return v / 8;
    if (v >= 0) return 8388607 - lo;
    return -8388608 + lo;
  endfunction

  function automatic longint sat24(input longint v);
    if (v > 64'sd8388607)  return 64'sd8388607;
    if (v < -64'sd8388608) return -64'sd8388608;
    return v;
  endfunction

  function automatic longint ref_out(input longint acc, input int shift);
    return sat24(acc >>> shift);
  endfunction

endpackage
