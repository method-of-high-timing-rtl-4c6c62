// tb_ref_pkg: reference models for the testbenches, in real arithmetic.
//
// ideal_pulse() evaluates the trapezoid pulse directly from its definition: linear
// rise over Tr/0.8 from V_L to V_H starting at t = 0, high level, linear fall over
// Tf/0.8 ending at Tw + (Tr+Tf)/1.6, low level to the end of the period; times in ticks.
// make_params() builds a parameter set for the generator from the same quantities
// using real arithmetic, independently of the parameter control. ref_biquad_step() runs
// one step of a second-order section in floating point.
package tb_ref_pkg;
  import pulse_pkg::*;

  function automatic real ideal_pulse(input real t, input real tw, input real tr,
                                      input real tf, input real vh, input real vl);
    real lr, lf, k2, k3;
    lr = tr / 0.8;
    lf = tf / 0.8;
    k2 = tw + (tr - tf) / 1.6;
    k3 = tw + (tr + tf) / 1.6;
    if (t < lr)      return vl + (vh - vl) * t / lr;
    else if (t < k2) return vh;
    else if (t < k3) return vl + (vh - vl) * (k3 - t) / lf;
    else             return vl;
  endfunction

  function automatic logic [SLOPE_W-1:0] ref_slope(input real amp, input real t_ticks);
    real s;
    if (t_ticks == 0.0) return '0;
    s = amp * 0.8 / t_ticks * real'(64'd1 << SLOPE_FRAC);
    return SLOPE_W'(longint'(s));
  endfunction

  // tw_q, tr_q, tf_q in quarter ticks
  function automatic pulse_params_t make_params(input int period, input int tw_q,
                                                input int tr_q, input int tf_q,
                                                input int vh, input int vl);
    pulse_params_t p;
    real tw, tr, tf, scale;
    tw = tw_q / 4.0;
    tr = tr_q / 4.0;
    tf = tf_q / 4.0;
    scale = real'(1 << THR_FRAC);
    p.period       = K_W'(period);
    p.k_rise_end   = THR_W'(longint'(tr / 0.8 * scale));
    p.k_fall_start = THR_W'(longint'((tw + (tr - tf) / 1.6) * scale));
    p.k_fall_end   = THR_W'(longint'((tw + (tr + tf) / 1.6) * scale));
    p.slope_r      = ref_slope(real'(vh - vl), tr);
    p.slope_f      = ref_slope(real'(vh - vl), tf);
    p.v_high       = sample_t'(vh);
    p.v_low        = sample_t'(vl);
    return p;
  endfunction

  function automatic real coef_real(input coef_t c);
    return real'(c) / real'(64'd1 << COEF_FRAC);
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

endpackage
