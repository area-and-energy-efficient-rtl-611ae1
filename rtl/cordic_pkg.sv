// cordic_pkg: types and constant functions shared by the CORDIC blocks.
//
// The CORDIC works on a circle (m = 1) in one of two modes. In rotate mode the
// direction of each micro-rotation follows the sign of the residual angle z,
// in vectoring mode it follows the negated sign of y. The step angles
// e_i = atan(2^-i) and the scale constant K = prod_i 1/sqrt(1 + 2^-2i) are
// computed here at elaboration time, so no table of numbers is kept in the
// source. Angles are two's-complement radians with FRAC fractional bits; the
// designs in this library use FRAC = word length - 3 (range just under +-4 rad),
// which is this library's choice, not a number taken from the algorithm.
package cordic_pkg;

  typedef enum logic {
    MODE_ROTATE = 1'b0,   // d_i = sgn(z_i)
    MODE_VECTOR = 1'b1    // d_i = -sgn(y_i)
  } cordic_mode_e;

  // Step angle atan(2^-i) rounded to FRAC fractional bits of a radian.
  function automatic longint step_angle(input int i, input int frac);
    real v;
    v = $atan(2.0 ** (-i)) * (2.0 ** frac);
    return longint'($floor(v + 0.5));
  endfunction

  // Scale constant K of n pseudo-rotations, as a real number.
  function automatic real gain_k(input int n);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k / $sqrt(1.0 + 2.0 ** (-2 * i));
    return k;
  endfunction

  // K rounded to frac fractional bits.
  function automatic longint gain_k_fixed(input int n, input int frac);
    return longint'($floor(gain_k(n) * (2.0 ** frac) + 0.5));
  endfunction

  // Length of group g (0 = least significant) of a carry-select adder whose
  // group lengths grow in the arithmetic progression first, first+2, ...
  function automatic int csel_group_len(input int first, input int g);
    return first + 2 * g;
  endfunction

  // Number of groups needed to cover width bits (the last group is pruned).
  function automatic int csel_num_groups(input int first, input int width);
    int covered, g;
    covered = 0;
    g = 0;
    while (covered < width) begin
      covered += first + 2 * g;
      g++;
    end
    return g;
  endfunction

  // Bit position of the least significant bit of group g.
  function automatic int csel_group_lsb(input int first, input int g);
    int s;
    s = 0;
    for (int j = 0; j < g; j++) s += first + 2 * j;
    return s;
  endfunction

  // Progression that covers width with the least pruning: 1 (1,3,5,..) or
  // 2 (2,4,6,..). 9, 16, 25, 36 use the odd one, 12, 20, 30 the even one.
  function automatic int csel_best_first(input int width);
    int w1, w2;
    w1 = csel_group_lsb(1, csel_num_groups(1, width));
    w2 = csel_group_lsb(2, csel_num_groups(2, width));
    return (w2 < w1) ? 2 : 1;
  endfunction

  // Canonical signed digit recoding of a non-negative constant: returns the
  // mask of the +1 digits (neg = 0) or of the -1 digits (neg = 1). No two
  // adjacent digits are non-zero, which gives the fewest add/subtract terms.
  function automatic longint csd_digits(input longint value, input bit neg);
    longint v, pm, nm;
    pm = 0;
    nm = 0;
    v  = value;
    for (int i = 0; i < 63; i++) begin
      if (v[0]) begin
        if (v[1]) begin
          nm = nm | (longint'(1) << i);
          v  = v + 1;
        end else begin
          pm = pm | (longint'(1) << i);
          v  = v - 1;
        end
      end
      v = v >>> 1;
    end
    return neg ? nm : pm;
  endfunction

endpackage
