// oc_pkg: types and constant functions shared by the bit-stream online computers.
//
// A computer for y = [x^(M/N) + 0.5] compares two integer step functions,
//   left  side  L(x) = 2^N * x^M          (argument, advanced once per input bit)
//   right side  R(y) = (2y - 1)^N          (result,   advanced once per output bit)
// and emits output bit number y as soon as L(x) >= R(y). Neither side is ever
// multiplied out: each is produced by a chain of adders holding its forward
// differences (Newton's difference table), so a step costs one addition per
// stage. This package computes the start values of those chains from M and N.
//
// The comparison rule and the two polynomials follow the inequalities of the
// method (for example 2^2 x^3 >= (2y-1)^2 for x^(3/2)); starting every
// difference chain from its table at x = 0 and y = 1 reproduces the register
// start values of the worked example (SM1 = 4, Count = 24, RG1 = 24, SM2 = 8,
// RG2 = 8, SM_RES = -1). Deriving them for any M and N is this design's own
// generalisation.
package oc_pkg;

  // States of the control unit: a0 waits for an input bit, a1 adds the argument
  // increment, a2 subtracts a result increment and emits one output bit.
  typedef enum logic [1:0] {
    A0 = 2'd0,
    A1 = 2'd1,
    A2 = 2'd2
  } oc_state_e;

  // Which side of the inequality a difference chain produces.
  typedef enum logic {
    SIDE_LEFT  = 1'b0,   // L(x) = 2^N * x^M, table taken at x = 0
    SIDE_RIGHT = 1'b1    // R(y) = (2y-1)^N, table taken at y = 1
  } side_e;

  // Integer power, exact as long as the result fits 64 bits.
  function automatic longint ipow(longint base, int unsigned e);
    longint r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * base;
    return r;
  endfunction

  // Binomial coefficient C(n, k).
  function automatic longint binom(longint n, longint k);
    longint r = 1;
    for (longint i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  // Value of one side of the inequality at point p (x for the left side, y for
  // the right side).
  function automatic longint side_value(side_e side, int unsigned m, int unsigned n, longint p);
    if (side == SIDE_LEFT) return ipow(2, n) * ipow(p, m);
    else                   return ipow(2 * p - 1, n);
  endfunction

  // j-th forward difference of one side at its start point:
  //   D^j f(p0) = sum_i (-1)^(j-i) C(j,i) f(p0 + i),  p0 = 0 (left) or 1 (right).
  // j = 0 gives the start value itself.
  function automatic longint fwd_diff(side_e side, int unsigned m, int unsigned n, int unsigned j);
    longint acc = 0;
    longint p0  = (side == SIDE_LEFT) ? 0 : 1;
    for (longint i = 0; i <= longint'(j); i++) begin
      if (((longint'(j) - i) % 2) == 0) acc = acc + binom(longint'(j), i) * side_value(side, m, n, p0 + i);
      else                              acc = acc - binom(longint'(j), i) * side_value(side, m, n, p0 + i);
    end
    return acc;
  endfunction

  // Start value of the result adder SM_RES: L(0) - R(1), which is -1 for every
  // M >= 1, N >= 1.
  function automatic longint res_init(int unsigned m, int unsigned n);
    return side_value(SIDE_LEFT, m, n, 0) - side_value(SIDE_RIGHT, m, n, 1);
  endfunction

endpackage
