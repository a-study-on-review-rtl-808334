// Self-checking testbench for the reverse carry propagate adder chain.
//
// Part 1: three 8-bit chains, one per RCPFA design, are run over all 65,536
// operand pairs. Every output (sum bits, F_W, C_0) is compared with the
// chain reference model, and the error of the approximate result
// s + 2^8*F_8 against the exact a + b is accumulated into the published
// 8-bit error statistics (error taken as exact minus approximate):
//   design  ER %    MED    max ED  mean    std dev
//   1       75.95   18.20  128     -0.33   31.98
//   2       65.99   18.12  127     18.12   26.57
//   3       (80.08) 18.79  128     -18.79  26.58
// Design 3's published error rate disagrees with its own other figures (the
// reference model gives 85.91 %), so it is reported but not checked.
// Part 2: a chain at its default width of 16 bits, design 1, is compared
// with the model on random operands and on corner cases.
module tb_rcpa;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int unsigned WS = 8;
  localparam int unsigned RANDOM_VECTORS = 20000;

  logic [WS-1:0] a8, b8;
  logic [WS-1:0] s8 [3];
  logic          fm8 [3];
  logic          cl8 [3];

  rcpa #(.W(WS), .DESIGN(RCPFA_D1)) u_d1 (.a(a8), .b(b8), .s(s8[0]), .f_msb(fm8[0]), .c_lsb(cl8[0]));
  rcpa #(.W(WS), .DESIGN(RCPFA_D2)) u_d2 (.a(a8), .b(b8), .s(s8[1]), .f_msb(fm8[1]), .c_lsb(cl8[1]));
  rcpa #(.W(WS), .DESIGN(RCPFA_D3)) u_d3 (.a(a8), .b(b8), .s(s8[2]), .f_msb(fm8[2]), .c_lsb(cl8[2]));

  logic [15:0] a16, b16, s16;
  logic        fm16, cl16;

  rcpa u_default (.a(a16), .b(b16), .s(s16), .f_msb(fm16), .c_lsb(cl16));

  int checks   = 0;
  int failures = 0;

  // Published 8-bit error statistics, designs 1..3.
  const real pub_er [3]  = '{75.95, 65.99, 80.08};
  const real pub_med [3] = '{18.20, 18.12, 18.79};
  const int  pub_max [3] = '{128, 127, 128};
  const real pub_mu [3]  = '{-0.33, 18.12, -18.79};
  const real pub_sd [3]  = '{31.98, 26.57, 26.58};

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_close(string what, real got, real want, real tol);
    checks++;
    if (got > want + tol || got < want - tol) begin
      failures++;
      $display("FAIL %s: got %f, published %f", what, got, want);
    end else begin
      $display("ok   %s: %f (published %f)", what, got, want);
    end
  endtask

  initial begin : main
    int        n_err [3];
    longint    sum_abs [3];
    longint    sum_e [3];
    real       sum_e2 [3];
    int        max_ed [3];
    chain_out_t r;
    int        exact, approx, e;
    real       mean, sd;
    real       total;
    int        ae;

    a16 = '0; b16 = '0;
    for (int d = 0; d < 3; d++) begin
      n_err[d] = 0; sum_abs[d] = 0; sum_e[d] = 0; sum_e2[d] = 0.0; max_ed[d] = 0;
    end

    for (int v = 0; v < (1 << (2 * WS)); v++) begin
      {a8, b8} = (2 * WS)'(v);
      #1;
      exact = int'(a8) + int'(b8);
      for (int d = 0; d < 3; d++) begin
        r = ref_chain(d + 1, WS, 64'(a8), 64'(b8));
        checks++;
        if ({s8[d], fm8[d], cl8[d]} !== {r.s[WS-1:0], r.f_msb, r.c_lsb}) begin
          failures++;
          if (failures < 20)
            $display("FAIL design %0d a=%h b=%h: got s=%h f=%b c0=%b, want s=%h f=%b c0=%b",
                     d + 1, a8, b8, s8[d], fm8[d], cl8[d], r.s[WS-1:0], r.f_msb, r.c_lsb);
        end
        approx = int'(s8[d]) + (int'(fm8[d]) << WS);
        e      = exact - approx;
        ae     = (e < 0) ? -e : e;
        if (e != 0) n_err[d]++;
        sum_abs[d] += longint'(ae);
        sum_e[d]   += longint'(e);
        sum_e2[d]  += real'(e) * real'(e);
        if (ae > max_ed[d]) max_ed[d] = ae;
      end
    end

    for (int d = 0; d < 3; d++) begin
      total = real'(1 << (2 * WS));
      $display("design %0d:", d + 1);
      if (d != 2) check_close("error rate %", 100.0 * n_err[d] / total, pub_er[d], 0.006);
      else $display("info error rate %%: %f (published %f)", 100.0 * n_err[d] / total, pub_er[d]);
      check_close("mean error distance", real'(sum_abs[d]) / total, pub_med[d], 0.006);
      check_close("max error distance", real'(max_ed[d]), real'(pub_max[d]), 0.0);
      mean = real'(sum_e[d]) / total;
      sd   = $sqrt(sum_e2[d] / total - mean * mean);
      check_close("mean error", mean, pub_mu[d], 0.006);
      check_close("error std dev", sd, pub_sd[d], 0.006);
    end

    // Part 2: default width.
    for (int v = 0; v < RANDOM_VECTORS + 4; v++) begin
      case (v)
        0: begin a16 = '0;       b16 = '0;       end
        1: begin a16 = '1;       b16 = '1;       end
        2: begin a16 = 16'h8000; b16 = 16'h8000; end
        3: begin a16 = 16'h5555; b16 = 16'haaaa; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); end
      endcase
      #1;
      r = ref_chain(1, 16, 64'(a16), 64'(b16));
      checks++;
      if ({s16, fm16, cl16} !== {r.s[15:0], r.f_msb, r.c_lsb}) begin
        failures++;
        if (failures < 20)
          $display("FAIL W=16 a=%h b=%h: got s=%h f=%b c0=%b, want s=%h f=%b c0=%b",
                   a16, b16, s16, fm16, cl16, r.s[15:0], r.f_msb, r.c_lsb);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
