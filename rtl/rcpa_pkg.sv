// Shared definitions for the reverse carry propagate adder (RCPA) family.
//
// An RCPA is built from reverse carry propagate full adder (RCPFA) cells.
// Three cell designs exist; they differ in how the forecast signal F is
// formed and in which of the two complex-gate terms (X_i, Y_i) they keep:
//   RCPFA_D1 : full general form, forecast F_{i+1} = A_i
//   RCPFA_D2 : Y_i term only,     forecast F_{i+1} = A_i & B_i
//   RCPFA_D3 : X_i term only,     forecast F_{i+1} = A_i | B_i
// The enum selects the cell design in the RCPA and the hybrid adder.
package rcpa_pkg;

  typedef enum logic [1:0] {
    RCPFA_D1 = 2'd1,
    RCPFA_D2 = 2'd2,
    RCPFA_D3 = 2'd3
  } rcpfa_design_e;

endpackage
