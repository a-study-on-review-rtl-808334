// End-to-end testbench for the hybrid adder at its default size
// (32 bits, lower 16 approximate with RCPFA design 1, upper 16 exact).
//
// Operands come from directed cases and random numbers; a share of the
// random vectors is biased so that the rarer mechanisms occur often. Every
// output is compared with a reference that models the lower part bit by bit
// from the cell equations and adds the upper part with the simulator's own
// arithmetic. The testbench counts, and requires to occur at least once:
//   - the forecast at the joining point carrying into the exact part,
//   - the joining point passing no carry,
//   - a carry rippling across the whole exact part,
//   - a carry out of the adder,
//   - a result that differs from the exact sum (approximation error),
//   - an exact result,
//   - a carry left at the bottom of the RCPA chain (C_0 = 1).
// It also checks that an error never reaches the exact part beyond the
// carry it receives: the approximate result differs from a + b by less
// than 2^K.
module tb_rcpa_hybrid_adder;
  import rcpa_ref_pkg::*;

  localparam int N = 32;
  localparam int K = 16;
  localparam int RANDOM_VECTORS = 200000;

  logic [N-1:0] a, b, sum;
  logic         cout, joint_carry, c_lsb;

  rcpa_hybrid_adder dut (
    .a(a), .b(b), .sum(sum), .cout(cout), .joint_carry(joint_carry), .c_lsb(c_lsb)
  );

  int checks   = 0;
  int failures = 0;

  typedef enum int {
    EV_JOINT_CARRY, EV_JOINT_NONE, EV_FULL_RIPPLE, EV_COUT, EV_APPROX_ERROR,
    EV_EXACT, EV_C_LSB, EV_COUNT
  } event_e;
  int events [EV_COUNT];
  const string event_names [EV_COUNT] = '{
    "joint carry into exact part", "no joint carry", "carry across exact part",
    "carry out", "approximation error", "exact result", "leftover C_0"};

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    hybrid_out_t r;
    longint      exact, approx, diff;
    for (int e = 0; e < EV_COUNT; e++) events[e] = 0;

    for (int v = 0; v < RANDOM_VECTORS + 6; v++) begin
      case (v)
        0: begin a = '0;            b = '0;            end
        1: begin a = '1;            b = '1;            end
        2: begin a = 32'h7fff_8000; b = 32'h0000_0000; end  // ripple across upper half
        3: begin a = 32'h0000_ffff; b = 32'h0000_0001; end
        4: begin a = 32'h1234_5678; b = 32'h9abc_def0; end
        5: begin a = 32'hffff_8000; b = 32'h0000_0000; end  // carry out via joint
        default: begin
          a = $urandom;
          b = $urandom;
          if (v % 4 == 0) b[N-1:K] = ~a[N-1:K];  // upper halves propagate
        end
      endcase
      #1;
      r = ref_hybrid(1, N, K, 64'(a), 64'(b));
      checks++;
      if ({cout, sum} !== r.total[N:0] || joint_carry !== r.joint || c_lsb !== r.c_lsb) begin
        failures++;
        if (failures < 20)
          $display("FAIL a=%h b=%h: got cout=%b sum=%h joint=%b c0=%b, want %h joint=%b c0=%b",
                   a, b, cout, sum, joint_carry, c_lsb, r.total[N:0], r.joint, r.c_lsb);
      end
      exact  = longint'(a) + longint'(b);
      approx = longint'({cout, sum});
      diff   = approx - exact;
      checks++;
      if (diff >= (64'sd1 <<< K) || diff <= -(64'sd1 <<< K)) begin
        failures++;
        $display("FAIL error bound a=%h b=%h: error %0d", a, b, diff);
      end
      if (joint_carry) events[EV_JOINT_CARRY]++; else events[EV_JOINT_NONE]++;
      if (joint_carry && (a[N-1:K] ^ b[N-1:K]) == '1) events[EV_FULL_RIPPLE]++;
      if (cout) events[EV_COUT]++;
      if (diff != 0) events[EV_APPROX_ERROR]++; else events[EV_EXACT]++;
      if (c_lsb) events[EV_C_LSB]++;
    end

    for (int e = 0; e < EV_COUNT; e++) begin
      $display("mechanism %-28s : %0d", event_names[e], events[e]);
      checks++;
      if (events[e] == 0) begin
        failures++;
        $display("FAIL mechanism never occurred: %s", event_names[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
