// RCPFA design 2: reverse carry propagate full adder cell, Y_i term only.
//
// Derived from the general cell (see rcpfa_d1) by dropping the AOI21 term
// X_i, i.e. treating it as 0. What remains is one OAI21 gate and two NANDs:
//   Y_i  = OAI21(A_i, B_i, ~C_{i+1}) = ~((A_i | B_i) & ~C_{i+1})
//   S_i  = ~(Y_i & ~F_i)
//   ~C_i = ~(Y_i &  F_i)
//   ~F_{i+1} = ~(A_i & B_i)
// so the forecast sent up is F_{i+1} = A_i & B_i: a carry is predicted only
// where bit i generates one. Dropping X_i can only raise S_i - C_i, so the
// errors of this cell, taken alone, are one-sided.
//
// Interface: single active-high bits, purely combinational. The gate-level
// form uses inverted F and C; the ports here carry true polarity and the
// inversions are internal. The Y_i-only structure follows the published
// cell; the AND forecast was fixed by matching the published 8-bit error
// statistics.
module rcpfa_d2 (
  input  logic a,       // A_i
  input  logic b,       // B_i
  input  logic c_next,  // C_{i+1}
  input  logic f,       // F_i
  output logic s,       // S_i
  output logic c,       // C_i
  output logic f_next   // F_{i+1}
);

  logic y, f_n, c_n, f_next_n;

  always_comb begin
    f_n      = ~f;
    y        = ~((a | b) & ~c_next);
    s        = ~(y & f_n);
    c_n      = ~(y & f);
    c        = ~c_n;
    f_next_n = ~(a & b);
    f_next   = ~f_next_n;
  end

endmodule
