// qsd_mult_par: N x N-digit parallel QSD multiplier with a binary reduction
// tree of carry-free adders (N a power of two, N >= 2; default 4).
//
// N partial product generators (qsd_ppgen) form P_j = A * B_j, N+1 digits
// each. The weighted sum sum(P_j * 4^j) is reduced pairwise in log2(N)
// levels. At level l the two terms of a pair are 2^(l-1) digits apart: the
// lower term's 2^(l-1) lowest digits are already final and bypass the adder,
// its remaining digits (zero-extended) are added to the upper term in a
// carry-free QSD adder (qsd_adder) as wide as the terms of the level below,
// and the new term is {carry-out, sum, bypassed digits}. From level 2 on the
// adder's carry-out is always zero (the top digit of one operand is 0 and of
// the other a sign-extended carry in -1..1, which never reach +-3), so it is
// dropped; an assertion checks this. Term widths are N+1, N+3, N+5, N+9, ...
// digits, ending at exactly 2N+1 digits for the product.
//
// For N = 4 this is, field for field, the published 4x4 multiplier: four
// 4-digit partial product generators; two 5-digit adders fed with
// {000, P0[14:3]} + P1 and {000, P2[14:3]} + P3; a 7-digit adder fed with
// {000000, sext(Cout_A), S_A[14:3]} and {sext(Cout_B), S_B[14:0], P2[2:0]};
// R[2:0] = P0[2:0], R[5:3] = S_A[2:0], R[26:6] = the 7-digit sum. The
// generalisation of that wiring to other powers of two is this design's own,
// following the published description of an n x n parallel multiplier with n
// partial product circuits, n-1 adders and a binary reduction.
//
// Interface: a, b are N packed 3-bit two's-complement digits (digit i in bits
// [3i+2:3i]); r is the 2N+1-digit product. Purely combinational; the depth is
// one partial product generator plus log2(N) adders, none with carry ripple.
module qsd_mult_par
  import qsd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [DIGIT_W*N-1:0]       a,
  input  logic [DIGIT_W*N-1:0]       b,
  output logic [DIGIT_W*(2*N+1)-1:0] r
);

  localparam int unsigned L  = $clog2(N);  // reduction levels
  localparam int unsigned RW = 2 * N + 1;  // product digits

  // Width in digits of the terms after level l.
  function automatic int unsigned term_w(int unsigned l);
    int unsigned w = N + 1;
    for (int unsigned i = 1; i <= l; i++) w += (i == 1) ? 2 : (1 << (i - 1));
    return w;
  endfunction

  // g_lvl[l].t[k]: term k after level l (level 0: the partial products),
  // zero-extended to the product width. Level l holds N >> l terms.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [DIGIT_W*RW-1:0] t [N >> l];

    if (l == 0) begin : g_pp
      for (genvar k = 0; k < N; k++) begin : g_term
        logic [DIGIT_W*(N+1)-1:0] pp;
        qsd_ppgen #(.N(N)) u_ppgen (
          .a (a),
          .b (b[DIGIT_W*k +: DIGIT_W]),
          .m (pp)
        );
        assign t[k] = (DIGIT_W*RW)'(pp);
      end
    end else begin : g_reduce
      localparam int unsigned WP = term_w(l - 1);  // adder width, digits
      localparam int unsigned S  = 1 << (l - 1);   // bypassed digits
      for (genvar k = 0; k < (N >> l); k++) begin : g_term
        logic [DIGIT_W*WP-1:0] lo, hi, lo_sh, sum;
        qsd_carry_t            cout;
        // Terms of the level below are only WP digits wide; the rest is 0.
        assign lo    = (DIGIT_W*WP)'(g_lvl[l-1].t[2*k]);
        assign hi    = (DIGIT_W*WP)'(g_lvl[l-1].t[2*k+1]);
        assign lo_sh = lo >> (DIGIT_W * S);
        qsd_adder #(.N(WP)) u_adder (
          .a    (lo_sh),
          .b    (hi),
          .s    (sum),
          .cout (cout)
        );
        if (l == 1) begin : g_keep_cout
          assign t[k] = (DIGIT_W*RW)'({carry_to_digit(cout), sum, lo[DIGIT_W*S-1:0]});
        end else begin : g_drop_cout
          assign t[k] = (DIGIT_W*RW)'({sum, lo[DIGIT_W*S-1:0]});
          always_comb begin
            assert (cout == '0) else $error("qsd_mult_par: unexpected carry-out at level %0d", l);
          end
        end
      end
    end
  end

  assign r = g_lvl[L].t[0];

  if (N < 2 || (1 << L) != N) begin : g_bad_n
    $error("qsd_mult_par: N must be a power of two, at least 2");
  end

endmodule
