// cordic_ref_pkg: reference models used by the CORDIC testbenches.
//
// Everything here is written with plain integer arithmetic on 64-bit values
// (and real arithmetic for the ideal results), independently of the RTL
// structure: no adder cells, shifter levels or ROM modules are involved.
package cordic_ref_pkg;

  // sign-extend the low w bits of v
  function automatic longint wrap(input longint v, input int w);
    longint m;
    m = (longint'(1) << w) - 1;
    v = v & m;
    if (v[w-1]) v = v | ~m;
    return v;
  endfunction

  function automatic longint ref_angle(input int i, input int frac);
    return longint'($floor($atan(1.0 / (2.0 ** i)) * (2.0 ** frac) + 0.5));
  endfunction

  // one micro-rotation, bit exact: returns x', y', z' through refs
  function automatic void ref_iter(input int i, input bit vect, input int w, input int zw,
                                   input int frac, inout longint x, inout longint y,
                                   inout longint z);
    longint xn, yn, zn, e;
    bit     pos_d;
    e     = ref_angle(i, frac);
    pos_d = vect ? (y < 0) : (z >= 0);
    if (pos_d) begin
      xn = x - (y >>> i);
      yn = y + (x >>> i);
      zn = z - e;
    end else begin
      xn = x + (y >>> i);
      yn = y - (x >>> i);
      zn = z + e;
    end
    x = wrap(xn, w);
    y = wrap(yn, w);
    z = wrap(zn, zw);
  endfunction

  // n micro-rotations, bit exact
  function automatic void ref_cordic(input int n, input bit vect, input int w, input int zw,
                                     input int frac, inout longint x, inout longint y,
                                     inout longint z);
    for (int i = 0; i < n; i++) ref_iter(i, vect, w, zw, frac, x, y, z);
  endfunction

  function automatic real ref_gain(input int n);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k * $sqrt(1.0 + 1.0 / (4.0 ** i));
    return 1.0 / k;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
