// tb_harris_pkg: reference arithmetic of the corner response for the
// testbenches: R = Sxx*Syy - Sxy^2 - ((Sxx+Syy)^2 >> 10) * 41, shifted right
// by the output scaling and saturated to a signed 32-bit value.
package tb_harris_pkg;
  function automatic longint r_ref(input longint sxx, input longint syy, input longint sxy,
                                   input int shift);
    longint det, tr, ktr2, r;
    det  = sxx * syy - sxy * sxy;
    tr   = sxx + syy;
    ktr2 = ((tr * tr) >>> 10) * 41;
    r    = (det - ktr2) >>> shift;
    if (r > 64'sh7FFF_FFFF) r = 64'sh7FFF_FFFF;
    if (r < -64'sh8000_0000) r = -64'sh8000_0000;
    return r;
  endfunction
endpackage
