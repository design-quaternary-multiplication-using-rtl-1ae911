// qsd_ppgen: N-digit QSD partial product generator (multiplicand times one
// multiplier digit).
//
// Digit i of the multiplicand a is multiplied by the digit b in a single-digit
// multiplier (qsd_digit_mult), giving a low digit m_i and a carry digit c_i,
// both in -2..2, worth m_i*4^i + c_i*4^(i+1). Position i therefore has to sum
// m_i and c_{i-1}; because a carry can reach magnitude 2, a second-step adder
// alone cannot do it, and a complete QSD adder stage is used as the gatherer:
//   digit 0        = m_0
//   digit 1        = s of qsd_csg(m_1, c_0)
//   digit i, 2..N-1 = qsd_step2(carry of csg at i-1, s of csg(m_i, c_{i-1}))
//   digit N        = qsd_step2(carry of csg at N-1, c_{N-1})
// The top digit needs no generator of its own: c_{N-1} (|.|<=2) plus a carry
// (|.|<=1) stays within -3..3. This is the published design's partial-product structure.
// The published design notes that the generators here could be simplified because their
// inputs never reach magnitude 3; this implementation reuses the general
// qsd_csg instead, which gives the same results.
//
// Parameters: N, digits of the multiplicand (default 4, as in the 4x4
// multiplier). Interface: a is N packed 3-bit digits, b one 3-bit digit, m the
// N+1-digit partial product (digit i in bits [3i+2:3i]). Purely combinational.
module qsd_ppgen
  import qsd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [DIGIT_W*N-1:0]     a,
  input  qsd_digit_t               b,
  output logic [DIGIT_W*(N+1)-1:0] m
);

  qsd_digit_t mc [N];  // single-digit product carries
  qsd_digit_t mm [N];  // single-digit product low digits
  qsd_carry_t gc [N];  // gatherer intermediate carries (index 1..N-1 used)
  qsd_digit_t gs [N];  // gatherer intermediate sums    (index 1..N-1 used)

  for (genvar i = 0; i < N; i++) begin : g_mult
    qsd_digit_mult u_mult (
      .a (a[DIGIT_W*i +: DIGIT_W]),
      .b (b),
      .c (mc[i]),
      .m (mm[i])
    );
  end

  assign m[0 +: DIGIT_W] = mm[0];
  assign gc[0] = '0;
  assign gs[0] = '0;

  if (N == 1) begin : g_single
    assign m[DIGIT_W +: DIGIT_W] = mc[0];
  end else begin : g_multi
    for (genvar i = 1; i < N; i++) begin : g_gather
      qsd_csg u_csg (
        .a (mm[i]),
        .b (mc[i-1]),
        .c (gc[i]),
        .s (gs[i])
      );
      if (i == 1) begin : g_first
        assign m[DIGIT_W*i +: DIGIT_W] = gs[i];
      end else begin : g_step2
        qsd_step2 u_step2 (
          .a (gc[i-1]),
          .b (gs[i]),
          .s (m[DIGIT_W*i +: DIGIT_W])
        );
      end
    end
    qsd_step2 u_top (
      .a (gc[N-1]),
      .b (mc[N-1]),
      .s (m[DIGIT_W*N +: DIGIT_W])
    );
  end

  initial assert (N >= 1) else $error("qsd_ppgen: N must be at least 1");

endmodule
