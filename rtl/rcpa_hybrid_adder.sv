// Hybrid approximate adder: RCPA in the low part, Kogge-Stone in the high part.
//
// The N-bit operands are split at bit K. Bits K-1..0 are added by a reverse
// carry propagate adder (RCPA), whose carry runs from bit K-1 down to bit 0,
// so any error it makes lands on low-weight bits. Bits N-1..K are added
// exactly by a Kogge-Stone parallel-prefix adder. At the joining point the
// RCPA's top forecast F_K is both the RCPA's own top carry C_K and the carry
// into the exact part, so the exact part never waits for the approximate
// chain: its carry in depends only on bit K-1 of the operands. The delay is
// the longer of the RCPA's carry chain and the Kogge-Stone tree.
//
// Interface: a, b (N bits) in; sum (N bits), cout (carry out of bit N-1),
// joint_carry (F_K) and c_lsb (the RCPA's leftover C_0, not part of the sum)
// out. Purely combinational, no clock or reset. With design 1 the forecast
// of a cell is its A input, so joint_carry is simply a[K-1].
//
// Defaults follow the main configuration: N = 32, the lower half (K = 16)
// approximate, RCPFA design 1. Making K a free parameter is this
// implementation's choice; it must satisfy 0 < K < N.
module rcpa_hybrid_adder
  import rcpa_pkg::*;
#(
  parameter int unsigned   N      = 32,
  parameter int unsigned   K      = N / 2,
  parameter rcpfa_design_e DESIGN = RCPFA_D1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         joint_carry,
  output logic         c_lsb
);

  if (K == 0 || K >= N) begin : g_bad_split
    $error("rcpa_hybrid_adder: K must satisfy 0 < K < N");
  end

  rcpa #(
    .W      (K),
    .DESIGN (DESIGN)
  ) u_approx (
    .a     (a[K-1:0]),
    .b     (b[K-1:0]),
    .s     (sum[K-1:0]),
    .f_msb (joint_carry),
    .c_lsb (c_lsb)
  );

  kogge_stone_adder #(
    .W (N - K)
  ) u_exact (
    .a    (a[N-1:K]),
    .b    (b[N-1:K]),
    .cin  (joint_carry),
    .s    (sum[N-1:K]),
    .cout (cout)
  );

endmodule
