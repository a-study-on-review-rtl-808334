// RCPFA design 1: reverse carry propagate full adder cell, general form.
//
// A reverse carry propagate cell rewrites the full-adder identity
// 2*C_{i+1} + S_i = A_i + B_i + C_i as S_i - C_i = A_i + B_i - 2*C_{i+1}:
// the carry C_{i+1} arrives from the more significant neighbour and the cell
// hands a carry C_i down to the less significant one. A forecast input F_i,
// produced by the less significant neighbour, chooses between the two
// encodings of zero (S,C = 0,0 or 1,1).
//
// The cell is two complex gates followed by two more:
//   X_i = AOI21(A_i, B_i, ~C_{i+1}) = ~((A_i & B_i) | ~C_{i+1})
//   Y_i = OAI21(A_i, B_i, ~C_{i+1}) = ~((A_i | B_i) & ~C_{i+1})
//   S_i  = ~(Y_i & (X_i | ~F_i))          (OAI21)
//   ~C_i = ~(X_i | (F_i & Y_i))           (AOI21)
// which together equal the sum-of-products forms
//   S_i = ~C_{i+1}F_i + ~C_{i+1}A_i + ~C_{i+1}B_i + A_iB_iF_i
//   C_i =  C_{i+1}F_i +  C_{i+1}~A_i + C_{i+1}~B_i + ~A_i~B_iF_i .
// The forecast sent up is F_{i+1} = A_i: it costs no gate, so f_next is a
// plain copy of input a.
//
// Interface: all ports are single, active-high bits; the cell is purely
// combinational. Ports use true polarity for C and F; the inverted carry of
// the gate-level form is kept internal. The equations, the AOI21/OAI21 split
// and the X_i/Y_i names follow the published cell; the choice F_{i+1} = A_i
// was fixed by matching the published 8-bit error statistics.
module rcpfa_d1 (
  input  logic a,       // A_i
  input  logic b,       // B_i
  input  logic c_next,  // C_{i+1}, from the more significant cell
  input  logic f,       // F_i, from the less significant cell
  output logic s,       // S_i
  output logic c,       // C_i, to the less significant cell
  output logic f_next   // F_{i+1}, to the more significant cell
);

  logic x, y, c_n;

  always_comb begin
    x      = ~((a & b) | ~c_next);
    y      = ~((a | b) & ~c_next);
    s      = ~(y & (x | ~f));
    c_n    = ~(x | (f & y));
    c      = ~c_n;
    f_next = a;
  end

endmodule
