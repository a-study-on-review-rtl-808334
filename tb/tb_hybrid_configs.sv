// Testbench for the six hybrid adder configurations compared in the
// evaluation: 16-bit and 32-bit adders, each built with RCPFA designs 1, 2
// and 3, with the lower half approximate and the upper half exact.
//
// All six adders share the same random operands (the 16-bit adders take the
// low 16 bits). Each result, joint carry and C_0 is compared with the
// reference model, and each configuration's error rate and mean error
// distance against the exact sum are printed. Every error must stay below
// 2^(n/2) in magnitude, the weight of the exact part. The testbench also checks the
// error sign seen in the published mean errors: whole adders built from
// design 2 can only under-estimate the sum, those built from design 3 can
// only over-estimate it.
module tb_hybrid_configs;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int RANDOM_VECTORS = 100000;

  logic [31:0] a, b;
  logic [31:0] sum32 [3];
  logic [15:0] sum16 [3];
  logic        co32 [3], jc32 [3], cl32 [3];
  logic        co16 [3], jc16 [3], cl16 [3];

  rcpa_hybrid_adder #(.N(16), .DESIGN(RCPFA_D1)) u16_d1 (.a(a[15:0]), .b(b[15:0]), .sum(sum16[0]), .cout(co16[0]), .joint_carry(jc16[0]), .c_lsb(cl16[0]));
  rcpa_hybrid_adder #(.N(16), .DESIGN(RCPFA_D2)) u16_d2 (.a(a[15:0]), .b(b[15:0]), .sum(sum16[1]), .cout(co16[1]), .joint_carry(jc16[1]), .c_lsb(cl16[1]));
  rcpa_hybrid_adder #(.N(16), .DESIGN(RCPFA_D3)) u16_d3 (.a(a[15:0]), .b(b[15:0]), .sum(sum16[2]), .cout(co16[2]), .joint_carry(jc16[2]), .c_lsb(cl16[2]));
  rcpa_hybrid_adder #(.N(32), .DESIGN(RCPFA_D1)) u32_d1 (.a(a), .b(b), .sum(sum32[0]), .cout(co32[0]), .joint_carry(jc32[0]), .c_lsb(cl32[0]));
  rcpa_hybrid_adder #(.N(32), .DESIGN(RCPFA_D2)) u32_d2 (.a(a), .b(b), .sum(sum32[1]), .cout(co32[1]), .joint_carry(jc32[1]), .c_lsb(cl32[1]));
  rcpa_hybrid_adder #(.N(32), .DESIGN(RCPFA_D3)) u32_d3 (.a(a), .b(b), .sum(sum32[2]), .cout(co32[2]), .joint_carry(jc32[2]), .c_lsb(cl32[2]));

  int checks   = 0;
  int failures = 0;
  int     n_err [6];    // per configuration: 16-bit d1..d3, 32-bit d1..d3
  longint sum_abs [6];

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int n, int dsel, logic [32:0] got, logic jc, logic cl,
                           logic [2:0] idx);
    hybrid_out_t r;
    longint      exact, diff;
    logic [63:0] mask, am, bm;
    mask = (64'd1 << n) - 64'd1;
    am   = 64'(a) & mask;
    bm   = 64'(b) & mask;
    r = ref_hybrid(dsel, n, n / 2, am, bm);
    checks++;
    if (got !== r.total[32:0] || jc !== r.joint || cl !== r.c_lsb) begin
      failures++;
      if (failures < 20)
        $display("FAIL %0d-bit design %0d a=%h b=%h: got %h joint=%b c0=%b, want %h joint=%b c0=%b",
                 n, dsel, a, b, got, jc, cl, r.total[32:0], r.joint, r.c_lsb);
    end
    exact = longint'(am) + longint'(bm);
    diff  = longint'(got) - exact;
    if (diff != 0) n_err[idx]++;
    sum_abs[idx] += (diff < 0) ? -diff : diff;
    checks++;
    if (diff >= (64'sd1 <<< (n / 2)) || diff <= -(64'sd1 <<< (n / 2))) begin
      failures++;
      if (failures < 20) $display("FAIL %0d-bit design %0d: error %0d reaches the exact part", n, dsel, diff);
    end
    checks++;
    if ((dsel == 2 && diff > 0) || (dsel == 3 && diff < 0)) begin
      failures++;
      if (failures < 20) $display("FAIL %0d-bit design %0d: error %0d has the wrong sign", n, dsel, diff);
    end
  endtask

  initial begin : main
    for (int i = 0; i < 6; i++) begin n_err[i] = 0; sum_abs[i] = 0; end
    for (int v = 0; v < RANDOM_VECTORS; v++) begin
      a = $urandom;
      b = $urandom;
      #1;
      for (int d = 0; d < 3; d++) begin
        check_one(16, d + 1, {16'd0, co16[d], sum16[d]}, jc16[d], cl16[d], 3'(d));
        check_one(32, d + 1, {co32[d], sum32[d]}, jc32[d], cl32[d], 3'(3 + d));
      end
    end
    for (int i = 0; i < 6; i++)
      $display("%0d-bit design %0d: error rate %f %%, mean error distance %f",
               (i < 3) ? 16 : 32, (i % 3) + 1, 100.0 * n_err[i] / RANDOM_VECTORS,
               real'(sum_abs[i]) / RANDOM_VECTORS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
