// tb_fsmpc_ref_pkg: reference arithmetic for the controller testbenches.
//
// Plain integer models (64-bit) of the saturating fixed-point operations and
// of the two cost functions, written from the equations rather than from the
// schedules: prediction i(k+1) = a*i + b*S_own + c*(sum of other S), errors
// and sums of squares. Values are WL-bit two's-complement numbers with FRAC
// fractional bits held in longint; products truncate toward zero.
package tb_fsmpc_ref_pkg;

  function automatic longint sat(input longint x, input int wl);
    longint hi = (64'sd1 <<< (wl - 1)) - 1;
    longint lo = -(64'sd1 <<< (wl - 1));
    return (x > hi) ? hi : ((x < lo) ? lo : x);
  endfunction

  function automatic longint q_add(input longint a, input longint b, input int wl);
    return sat(a + b, wl);
  endfunction

  function automatic longint q_sub(input longint a, input longint b, input int wl);
    return sat(a - b, wl);
  endfunction

  function automatic longint q_mul(input longint a, input longint b, input int wl,
                                   input int frac);
    longint ma = (a < 0) ? -a : a;
    longint mb = (b < 0) ? -b : b;
    longint m  = (ma * mb) >>> frac;
    return sat(((a < 0) != (b < 0)) ? -m : m, wl);
  endfunction

  // Sign-extend the low wl bits of x.
  function automatic longint sx(input longint x, input int wl);
    longint m = x & ((64'sd1 <<< wl) - 1);
    return (m >= (64'sd1 <<< (wl - 1))) ? m - (64'sd1 <<< wl) : m;
  endfunction

  // Switch values as fixed-point 0 / 1.0; s bit 3 = u, 2 = v, 1 = w, 0 = x.
  function automatic longint sval(input logic [3:0] s, input int bitpos, input int frac);
    return s[bitpos] ? (64'sd1 <<< frac) : 0;
  endfunction

  // Four-unit cost: squared errors e = ref + d*pred, plus the squared sum of
  // the three predicted currents (the predicted neutral-leg current).
  function automatic longint cost4(input longint i[3], input longint r[3],
                                   input longint a, input longint b, input longint c,
                                   input longint d, input logic [3:0] s,
                                   input int wl, input int frac);
    longint su = sval(s, 3, frac), sv = sval(s, 2, frac);
    longint sw = sval(s, 1, frac), sxx = sval(s, 0, frac);
    longint pu, pv, pw, eu, ev, ew, ps;
    pu = q_add(q_add(q_mul(i[0], a, wl, frac), q_mul(su, b, wl, frac), wl),
               q_mul(q_add(q_add(sw, sxx, wl), sv, wl), c, wl, frac), wl);
    pv = q_add(q_mul(q_add(q_add(sxx, su, wl), sw, wl), c, wl, frac),
               q_add(q_mul(sv, b, wl, frac), q_mul(i[1], a, wl, frac), wl), wl);
    pw = q_add(q_add(q_mul(q_add(q_add(sxx, su, wl), sv, wl), c, wl, frac),
                     q_mul(i[2], a, wl, frac), wl),
               q_mul(sw, b, wl, frac), wl);
    eu = q_add(r[0], q_mul(pu, d, wl, frac), wl);
    ev = q_add(r[1], q_mul(pv, d, wl, frac), wl);
    ew = q_add(r[2], q_mul(pw, d, wl, frac), wl);
    ps = q_add(pw, q_add(pv, pu, wl), wl);
    return q_add(q_add(q_mul(ew, ew, wl, frac),
                       q_add(q_mul(ev, ev, wl, frac), q_mul(eu, eu, wl, frac), wl), wl),
                 q_mul(ps, ps, wl, frac), wl);
  endfunction

  // Six-unit cost: squared errors e = ref - pred of the three phases.
  function automatic longint cost6(input longint i[3], input longint r[3],
                                   input longint a, input longint b, input longint c,
                                   input logic [3:0] s, input int wl, input int frac);
    longint su = sval(s, 3, frac), sv = sval(s, 2, frac);
    longint sw = sval(s, 1, frac), sxx = sval(s, 0, frac);
    longint p[3], e[3], own[3], oth[3];
    own = '{su, sv, sw};
    oth = '{q_add(q_add(sw, sv, wl), sxx, wl),
            q_add(q_add(su, sw, wl), sxx, wl),
            q_add(q_add(su, sv, wl), sxx, wl)};
    for (int k = 0; k < 3; k++) begin
      p[k] = q_add(q_add(q_mul(own[k], b, wl, frac), q_mul(i[k], a, wl, frac), wl),
                   q_mul(oth[k], c, wl, frac), wl);
      e[k] = q_sub(r[k], p[k], wl);
    end
    return q_add(q_mul(e[2], e[2], wl, frac),
                 q_add(q_mul(e[1], e[1], wl, frac), q_mul(e[0], e[0], wl, frac), wl), wl);
  endfunction

endpackage
