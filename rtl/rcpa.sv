// Reverse carry propagate adder (RCPA): W-bit approximate adder.
//
// W RCPFA cells are chained in two opposite directions. The forecast F runs
// from the least to the most significant cell (F_0 = 0, cell i produces
// F_{i+1}); the carry C runs the other way, from the most significant cell
// down (cell i takes C_{i+1} and produces C_i). Because the carry travels
// towards falling significance, a carry error made late in the chain lands
// on a low-weight bit.
//
// The top cell's carry input C_W is its own forecast output F_W; that bit is
// also the adder's carry out (weight 2^W), and it is what a hybrid adder
// passes to its exact upper part at the joining point. The carry left over
// at the bottom, C_0, is not part of the sum; it is brought out for
// observation only. Summing the cell identities S_i - C_i = A_i + B_i -
// 2*C_{i+1} over all bits gives s + 2^W*f_msb = a + b + c_lsb whenever no
// cell is forced into an error, so a set c_lsb marks a result one too high.
//
// Parameters: W (width, 16 = the lower half of the 32-bit hybrid adder) and
// DESIGN (which RCPFA cell). Purely combinational: the critical path runs
// through the C chain, from the top cell to S_0.
// F_0 = 0 and C_W = F_W are this implementation's reading of the chain ends.
module rcpa
  import rcpa_pkg::*;
#(
  parameter int unsigned   W      = 16,
  parameter rcpfa_design_e DESIGN = RCPFA_D1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         f_msb,  // F_W = C_W, carry out of the RCPA
  output logic         c_lsb   // C_0, carry left at the bottom of the chain
);

  logic [W:0] f;  // f[i] = F_i
  logic [W:0] c;  // c[i] = C_i

  assign f[0]  = 1'b0;
  assign c[W]  = f[W];
  assign f_msb = f[W];
  assign c_lsb = c[0];

  for (genvar i = 0; i < W; i++) begin : g_cell
    if (DESIGN == RCPFA_D2) begin : g_d2
      rcpfa_d2 u_cell (.a(a[i]), .b(b[i]), .c_next(c[i+1]), .f(f[i]),
                       .s(s[i]), .c(c[i]), .f_next(f[i+1]));
    end else if (DESIGN == RCPFA_D3) begin : g_d3
      rcpfa_d3 u_cell (.a(a[i]), .b(b[i]), .c_next(c[i+1]), .f(f[i]),
                       .s(s[i]), .c(c[i]), .f_next(f[i+1]));
    end else begin : g_d1
      rcpfa_d1 u_cell (.a(a[i]), .b(b[i]), .c_next(c[i+1]), .f(f[i]),
                       .s(s[i]), .c(c[i]), .f_next(f[i+1]));
    end
  end

endmodule
