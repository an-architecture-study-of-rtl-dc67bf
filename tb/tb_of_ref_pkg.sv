// tb_of_ref_pkg: reference arithmetic for the testbenches, written with plain
// 64-bit integers. It restates the number formats (gradients Q.8, flows Q.16,
// coefficients Q2.14) and evaluates equation (1) for one pixel:
//   u_bar = floor(sum of 8 neighbours / 8)
//   be1   = alpha^2 + Ix^2 + Iy^2,  be2 = Ix u_bar + Iy v_bar + It * 2^16
//   div   = trunc(be2 * 2^8 / be1) limited to +/-(2^23 - 1)
//   u'    = sat24(u_bar - floor(Ix div / 2^8)),  diff = (u' - u)^2 + (v' - v)^2
package tb_of_ref_pkg;

  function automatic longint sat(input longint x, input int bits);
    longint mx = (64'sd1 <<< (bits - 1)) - 1;
    longint mn = -(64'sd1 <<< (bits - 1));
    if (x > mx) return mx;
    if (x < mn) return mn;
    return x;
  endfunction

  function automatic longint ref_div(input longint num, input longint den);
    longint mx = (64'sd1 <<< 23) - 1;
    longint a  = (num < 0) ? -num : num;
    longint q;
    if (den == 0 || a / den > mx) q = mx;
    else q = a / den;
    return (num < 0) ? -q : q;
  endfunction

  // one pixel of equation (1); nbu/nbv are the eight neighbours
  function automatic void ref_pixel(input longint nbu[8], input longint nbv[8],
                                    input longint cu, input longint cv,
                                    input longint ix, input longint iy, input longint it,
                                    input longint alpha,
                                    output longint un, output longint vn, output longint diff);
    longint su = 0, sv = 0, ub, vb, be1, be2, q;
    for (int i = 0; i < 8; i++) begin su += nbu[i]; sv += nbv[i]; end
    ub  = su >>> 3;
    vb  = sv >>> 3;
    be1 = alpha * alpha + ix * ix + iy * iy;
    be2 = ix * ub + iy * vb + it * 65536;
    q   = ref_div(be2 * 256, be1);
    un  = sat(ub - ((ix * q) >>> 8), 24);
    vn  = sat(vb - ((iy * q) >>> 8), 24);
    diff = (un - cu) * (un - cu) + (vn - cv) * (vn - cv);
  endfunction

  // 3-tap filter with Q2.14 coefficients, saturated to 16 bits
  function automatic longint ref_filt(input longint e0, input longint e1, input longint e2,
                                      input longint c0, input longint c1, input longint c2);
    return sat((c0 * e0 + c1 * e1 + c2 * e2) >>> 14, 16);
  endfunction

endpackage
