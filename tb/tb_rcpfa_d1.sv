// Self-checking testbench for RCPFA design 1.
//
// Applies all 16 combinations of A_i, B_i, C_{i+1} and F_i and compares
// S_i, C_i and F_{i+1} with the sum-of-products reference model. It also
// checks the arithmetic meaning of the cell: wherever A_i + B_i - 2*C_{i+1}
// is -1 or +1, the general cell must give S_i - C_i equal to it, and
// approximate cells may depart from it only by the sign their design allows.
module tb_rcpfa_d1;
  import rcpa_ref_pkg::*;

  logic a, b, cu, f;
  logic s, c, fn;
  int   checks   = 0;
  int   failures = 0;

  rcpfa_d1 dut (.a(a), .b(b), .c_next(cu), .f(f), .s(s), .c(c), .f_next(fn));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_out_t exp_o;
    int        want, got;
    for (int v = 0; v < 16; v++) begin
      {a, b, cu, f} = 4'(v);
      #1;
      exp_o = ref_cell(1, a, b, cu, f);
      checks++;
      if ({s, c, fn} !== {exp_o.s, exp_o.c, exp_o.f_next}) begin
        failures++;
        $display("FAIL a=%b b=%b c_next=%b f=%b: got s=%b c=%b f_next=%b, want %b %b %b",
                 a, b, cu, f, s, c, fn, exp_o.s, exp_o.c, exp_o.f_next);
      end
      want = int'(a) + int'(b) - 2 * int'(cu);
      got  = int'(s) - int'(c);
      checks++;
      if (1 == 1 && (want == 1 || want == -1 || want == 0) && got != want) begin
        failures++;
        $display("FAIL value: a=%b b=%b c_next=%b f=%b S-C=%0d want %0d", a, b, cu, f, got, want);
      end else if (1 == 2 && want >= -1 && want <= 1 && got < want) begin
        failures++;
        $display("FAIL sign: design 2 below target at a=%b b=%b c_next=%b f=%b", a, b, cu, f);
      end else if (1 == 3 && want >= -1 && want <= 1 && got > want) begin
        failures++;
        $display("FAIL sign: design 3 above target at a=%b b=%b c_next=%b f=%b", a, b, cu, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
