// Kogge-Stone adder: exact W-bit parallel-prefix adder with carry in.
//
// Each bit forms generate g = a & b and propagate p = a ^ b. The carry in is
// treated as an extra bit below bit 0 that generates cin and propagates
// nothing, so the prefix tree spans W+1 positions. In stage l every position
// i >= 2^l combines with position i - 2^l:
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo
// After ceil(log2(W+1)) stages G at position i is the carry into bit i, and
// sum_i = p_i ^ carry_i. The tree has the Kogge-Stone shape: every node at
// every stage, fan-out of two, log depth.
//
// Parameter W defaults to 16, the upper half of the 32-bit hybrid adder.
// Purely combinational. Only the adder type is fixed by the design it
// serves; the prefix formulation with carry in at position 0 is this
// implementation's choice.
module kogge_stone_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned LEVELS = $clog2(W + 1);

  // Position 0 holds the carry in; position i+1 holds bit i.
  logic [LEVELS:0][W:0] gg;
  logic [LEVELS-1:0][W:0] pp;  // the last stage needs no propagate
  logic [W-1:0]         p_bit;

  assign gg[0][0] = cin;
  assign pp[0][0] = 1'b0;
  assign p_bit    = a ^ b;
  assign gg[0][W:1] = a & b;
  assign pp[0][W:1] = p_bit;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i <= W; i++) begin : g_node
      if (i >= (1 << l)) begin : g_comb
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i-(1<<l)]);
        if (l + 1 < LEVELS) begin : g_p
          assign pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
        end
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        if (l + 1 < LEVELS) begin : g_p
          assign pp[l+1][i] = pp[l][i];
        end
      end
    end
  end

  // gg[LEVELS][i] is the carry into bit i (carry out of bits below it).
  assign s    = p_bit ^ gg[LEVELS][W-1:0];
  assign cout = gg[LEVELS][W];

endmodule
