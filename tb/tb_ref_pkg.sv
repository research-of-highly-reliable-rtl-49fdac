// tb_ref_pkg: floating-point reference models shared by the testbenches.
// They are written from the textbook definitions, independently of the RTL:
// the SVPWM reference uses the sector / dwell-time (T1, T2, T0) geometry,
// not the min-max injection of the RTL.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979;

  // Sector-based space-vector modulation.  ua, ub are fractions of the DC-link
  // voltage; half is the PWM half period in counts.  Returns the on-time of
  // each phase (counts per half period) and the sector 1..6.
  function automatic void svm_ref(input real ua, input real ub, input real half,
                                  output real on_u, output real on_v, output real on_w,
                                  output int sector);
    real mag, ang, t1, t2, t0, phi;
    int k;
    // switching states of the six active vectors at 0, 60, ..., 300 degrees
    int st [6][3] = '{'{1,0,0}, '{1,1,0}, '{0,1,0}, '{0,1,1}, '{0,0,1}, '{1,0,1}};
    real on [3];
    mag = $sqrt(ua*ua + ub*ub);
    ang = $atan2(ub, ua);
    if (ang < 0.0) ang += 2.0*PI;
    k   = int'($floor(ang / (PI/3.0)));
    if (k > 5) k = 5;
    phi = ang - k*(PI/3.0);
    t1  = $sqrt(3.0) * half * mag * $sin(PI/3.0 - phi);
    t2  = $sqrt(3.0) * half * mag * $sin(phi);
    t0  = half - t1 - t2;
    for (int p = 0; p < 3; p++) on[p] = t0/2.0 + t1*st[k][p] + t2*st[(k+1)%6][p];
    on_u = on[0]; on_v = on[1]; on_w = on[2];
    sector = k + 1;
  endfunction

  function automatic real clampr(input real v, input real lo, input real hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
