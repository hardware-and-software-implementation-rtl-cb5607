// tb_ref_pkg: reference models for the MLP testbenches.
//
// Integer models of the fixed-point arithmetic, written independently of the RTL from
// the arithmetic it is specified to do (see act_fn and neuron), plus real-valued
// models of the exact functions for accuracy checks. Fixed-point words are passed as
// longint holding the signed integer value (value * 2^frac).
package tb_ref_pkg;

  // Piecewise-linear sigmoid, |v| breakpoints 1, 2.375, 5; slopes 1/4, 1/8, 1/32.
  function automatic longint ref_plan(longint v, int frac);
    longint one = longint'(1) << frac;
    longint u = (v < 0) ? -v : v;
    longint f;
    if (u >= 5 * one)           f = one;
    else if (8 * u >= 19 * one) f = u / 32 + (27 * one) / 32;
    else if (u >= one)          f = u / 8 + (5 * one) / 8;
    else                        f = u / 4 + one / 2;
    return (v < 0) ? one - f : f;
  endfunction

  // sel: 0 purelin, 1 logsig, 2 tansig, 3 purelin.
  function automatic longint ref_act(int sel, longint x, int frac);
    longint one = longint'(1) << frac;
    case (sel)
      1:       return ref_plan(x, frac);
      2:       return 2 * ref_plan(2 * x, frac) - one;
      default: return x;
    endcase
  endfunction

  // Floor division by 2^frac of a signed value.
  function automatic longint floor_div_pow2(longint v, int frac);
    longint d = longint'(1) << frac;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  // Clamp to a signed w-bit range; sets clamped.
  function automatic longint clamp_w(longint v, int w, output bit clamped);
    longint hi = (longint'(1) << (w - 1)) - 1;
    longint lo = -(longint'(1) << (w - 1));
    clamped = 1'b1;
    if (v > hi) return hi;
    if (v < lo) return lo;
    clamped = 1'b0;
    return v;
  endfunction

  // Exact activation functions on reals.
  function automatic real real_act(int sel, real x);
    case (sel)
      1:       return 1.0 / (1.0 + $exp(-x));
      2:       return (1.0 - $exp(-2.0 * x)) / (1.0 + $exp(-2.0 * x));
      default: return x;
    endcase
  endfunction

endpackage
