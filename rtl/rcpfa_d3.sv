// RCPFA design 3: reverse carry propagate full adder cell, X_i term only.
//
// Derived from the general cell (see rcpfa_d1) by dropping the OAI21 term
// Y_i, i.e. treating it as 1. What remains is one AOI21 gate and two NORs:
//   X_i  = AOI21(A_i, B_i, ~C_{i+1}) = ~((A_i & B_i) | ~C_{i+1})
//   S_i  = ~(X_i | ~F_i)
//   ~C_i = ~(X_i |  F_i)
//   ~F_{i+1} = ~(A_i | B_i)
// so the forecast sent up is F_{i+1} = A_i | B_i: a carry is predicted
// wherever bit i could generate or propagate one. Dropping Y_i can only
// lower S_i - C_i, so the errors of this cell, taken alone, are one-sided
// (opposite in sign to design 2).
//
// Interface: single active-high bits, purely combinational. Ports carry true
// polarity; the inversions of the gate-level form are internal. The X_i-only
// structure follows the published cell; the OR forecast was fixed by
// matching the published 8-bit error statistics.
module rcpfa_d3 (
  input  logic a,       // A_i
  input  logic b,       // B_i
  input  logic c_next,  // C_{i+1}
  input  logic f,       // F_i
  output logic s,       // S_i
  output logic c,       // C_i
  output logic f_next   // F_{i+1}
);

  logic x, f_n, c_n, f_next_n;

  always_comb begin
    f_n      = ~f;
    x        = ~((a & b) | ~c_next);
    s        = ~(x | f_n);
    c_n      = ~(x | f);
    c        = ~c_n;
    f_next_n = ~(a | b);
    f_next   = ~f_next_n;
  end

endmodule
