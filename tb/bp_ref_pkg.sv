// Reference model for the backprojection testbenches, written independently of the RTL:
// integer square root, the distance-to-time index with its beam and window tests, and the
// complex magnitude.
package bp_ref_pkg;
  import bp_pkg::*;

  function automatic longint isq(input longint v);
    longint r = longint'($floor($sqrt(real'(v))));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // returns 1 when pixel (x, y) takes sample t of projection u
  function automatic bit dic_ref(input flight_t fp, input int u, input int x, input int y,
                                 input int T_W, input int C_W, output int t);
    longint X, Y, d, tt, cmax;
    cmax = (longint'(1) << C_W) - 1;
    X = longint'(fp.rmin) + longint'(x) * fp.dx;
    if (X > cmax) X = cmax;
    Y = longint'(y) - longint'(u);
    if (Y < 0) Y = -Y;
    Y = Y * fp.dy;
    if (Y > cmax) Y = cmax;
    d  = isq(X * X + Y * Y);
    tt = d - longint'(fp.t0);
    t  = int'(tt);
    return (Y * 65536 <= X * longint'(fp.tanphi)) && tt >= 0 && tt < (longint'(1) << T_W);
  endfunction

  function automatic int wrap18(input longint v);
    longint m;
    m = v & 'h3FFFF;
    return (m >= 'h20000) ? int'(m - 'h40000) : int'(m);
  endfunction

  function automatic int mag_ref(input int re, input int im);
    return int'(isq(longint'(re) * re + longint'(im) * im));
  endfunction
endpackage
