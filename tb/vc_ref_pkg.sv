// vc_ref_pkg: reference models used by the testbenches, written in real
// arithmetic independently of the RTL.
//   pi_ref   PI controller: i += KI*e (e clamped to 16 bits), i clamped to the
//            output limits times 2^K_FRAC, y = floor((KP*e + i)/2^K_FRAC)
//            clamped to the limits.
//   rot_sd/rot_sq  inverse coordinate transformation with Q1.15 cos/sin,
//            floor and 16-bit saturation.
package vc_ref_pkg;

  function automatic real clampr(real x, real lo, real hi);
    return (x > hi) ? hi : ((x < lo) ? lo : x);
  endfunction

  class pi_ref;
    real kp, ki, scale, lo, hi, integ;
    bit  last_sat, last_wu;

    function new(int kp_i, int ki_i, int frac, int lo_i, int hi_i);
      kp = real'(kp_i);
      ki = real'(ki_i);
      scale = 2.0 ** frac;
      lo = real'(lo_i);
      hi = real'(hi_i);
      integ = 0.0;
    endfunction

    function int step(int r, int f);
      real e, isum, y;
      e = clampr(real'(r) - real'(f), -32768.0, 32767.0);
      isum = integ + ki * e;
      last_wu = (isum > hi * scale) || (isum < lo * scale);
      integ = clampr(isum, lo * scale, hi * scale);
      y = $floor((kp * e + integ) / scale);
      last_sat = (y > hi) || (y < lo);
      return int'(clampr(y, lo, hi));
    endfunction
  endclass

  function automatic int sat_floor15(real x);
    return int'(clampr($floor(x / 32768.0), -32768.0, 32767.0));
  endfunction

  function automatic int rot_sd(int d, int q, int c, int s);
    return sat_floor15(real'(d) * real'(c) - real'(q) * real'(s));
  endfunction

  function automatic int rot_sq(int d, int q, int c, int s);
    return sat_floor15(real'(d) * real'(s) + real'(q) * real'(c));
  endfunction

endpackage
