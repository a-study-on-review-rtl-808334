// Reference models for the RCPA testbenches.
//
// The cell model is written from the sum-of-products equations of each
// RCPFA design rather than from the complex-gate structure used in the RTL,
// so the two descriptions check each other:
//   D1: S = ~C'F + ~C'A + ~C'B + ABF      C = C'F + C'~A + C'~B + ~A~BF   F' = A
//   D2: S = ~C'(A + B) + F                C = F(C' + ~A~B)                F' = AB
//   D3: S = F(AB + ~C')                   C = C'(~A + ~B) + F             F' = A + B
// with C' = C_{i+1} (carry from above) and F' = F_{i+1} (forecast upward).
// The chain model walks the forecast up from F_0 = 0, closes C_W = F_W, and
// walks the carry back down, for widths up to 64 bits. The hybrid model adds
// the upper bits with the simulator's own arithmetic.
package rcpa_ref_pkg;

  typedef struct packed {
    logic s;
    logic c;
    logic f_next;
  } cell_out_t;

  typedef struct packed {
    logic [63:0] s;
    logic        f_msb;
    logic        c_lsb;
  } chain_out_t;

  function automatic cell_out_t ref_cell(int dsel, logic a, logic b,
                                         logic cu, logic f);
    cell_out_t o;
    case (dsel)
      2: begin
        o.s      = (!cu && (a || b)) || f;
        o.c      = f && (cu || (!a && !b));
        o.f_next = a && b;
      end
      3: begin
        o.s      = f && ((a && b) || !cu);
        o.c      = (cu && (!a || !b)) || f;
        o.f_next = a || b;
      end
      default: begin
        o.s      = (!cu && f) || (!cu && a) || (!cu && b) || (a && b && f);
        o.c      = (cu && f) || (cu && !a) || (cu && !b) || (!a && !b && f);
        o.f_next = a;
      end
    endcase
    return o;
  endfunction

  function automatic chain_out_t ref_chain(int dsel, int w,
                                           logic [63:0] a, logic [63:0] b);
    chain_out_t  o;
    logic [64:0] f;
    logic        cu;
    cell_out_t   co;
    o    = '0;
    f    = '0;
    for (int i = 0; i < w; i++) begin
      co     = ref_cell(dsel, a[i], b[i], 1'b0, f[i]);
      f[i+1] = co.f_next;  // the forecast does not depend on the carry
    end
    cu = f[w];
    o.f_msb = f[w];
    for (int i = w - 1; i >= 0; i--) begin
      co     = ref_cell(dsel, a[i], b[i], cu, f[i]);
      o.s[i] = co.s;
      cu     = co.c;
    end
    o.c_lsb = cu;
    return o;
  endfunction

  // Hybrid adder: chain model on bits k-1..0, exact addition of bits
  // n-1..k with the chain's F_k as carry in. Returns {cout, sum} in the low
  // n+1 bits, plus the joint carry and C_0.
  typedef struct packed {
    logic [64:0] total;
    logic        joint;
    logic        c_lsb;
  } hybrid_out_t;

  function automatic hybrid_out_t ref_hybrid(int dsel, int n, int k,
                                             logic [63:0] a, logic [63:0] b);
    hybrid_out_t o;
    chain_out_t  lo;
    logic [63:0] lo_mask;
    logic [64:0] hi;
    lo_mask = (64'd1 << k) - 64'd1;
    lo      = ref_chain(dsel, k, a & lo_mask, b & lo_mask);
    hi      = 65'(a >> k) + 65'(b >> k) + 65'(lo.f_msb);
    if (n < 64) hi = hi & ((65'd1 << (n - k + 1)) - 65'd1);
    o.total = (hi << k) | 65'(lo.s & lo_mask);
    o.joint = lo.f_msb;
    o.c_lsb = lo.c_lsb;
    return o;
  endfunction

endpackage
