// rect_ref_pkg: reference arithmetic for the rectification testbenches.
//
// bilerp_ref evaluates bilinear interpolation in its weighted-sum form,
//   A*(S-xf)*(S-yf) + B*xf*(S-yf) + C*(S-xf)*yf + D*xf*yf,  S = 2**fw,
// and rounds to nearest (halves up), independently of the difference form the
// hardware uses. frac_ref gives the in-cell fraction round(m * 2**fw / csz).
package rect_ref_pkg;

  function automatic longint bilerp_ref(input longint a, input longint b,
                                        input longint c, input longint d,
                                        input longint xf, input longint yf,
                                        input int fw);
    longint s, acc, q;
    s   = longint'(1) << fw;
    acc = a * (s - xf) * (s - yf) + b * xf * (s - yf) + c * (s - xf) * yf + d * xf * yf;
    acc = acc + (longint'(1) << (2 * fw - 1));
    // floor division by 2**(2fw)
    q = acc / (longint'(1) << (2 * fw));
    if (acc < 0 && (q * (longint'(1) << (2 * fw)) != acc)) q = q - 1;
    return q;
  endfunction

  function automatic longint frac_ref(input longint m, input longint csz, input int fw);
    return (m * (longint'(1) << fw) + csz / 2) / csz;
  endfunction

  function automatic longint clampl(input longint v, input longint lo, input longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // floor(v / 2**sh) for signed v
  function automatic longint floor_shift(input longint v, input int sh);
    return v >>> sh;
  endfunction

endpackage
