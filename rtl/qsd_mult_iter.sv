// qsd_mult_iter: iterative N x N-digit QSD multiplier (add-shift).
//
// One N-digit partial product generator (qsd_ppgen) and one 2N-digit
// carry-free QSD adder (qsd_adder) work against an accumulator. In iteration
// j (j = 0..N-1) the partial product A * B_j (N+1 digits) is shifted up by j
// digits and added to the accumulator; after N iterations the accumulator
// holds the 2N+1-digit product. Using an iterative datapath with a 2N-digit
// adder, a partial product generator and an accumulator, finishing after N
// iterations, follows the published design; the choices below are this implementation's:
//  * the partial product is shifted (not the accumulator), LSB digit of B
//    first, the B register shifting down one digit per iteration;
//  * the accumulator has 2N+1 digits, the adder's carry-out being the top one.
//    Before iteration j the accumulator only has digits 0..N+j (each addition
//    can extend its operands by one digit), so its top digit is still zero
//    when only its low 2N digits are fed back to the adder;
//  * start/busy/done handshake, active-low synchronous reset.
//
// Timing: start is sampled while idle; busy is high for the next N cycles
// (one iteration per clock) and done pulses for one cycle together with the
// falling edge of busy. p is valid from done until the next start and
// is cleared by reset and by start.
//
// Parameters: N, digits per operand (default 4, matching the parallel
// multiplier). Interface: a, b are N packed 3-bit two's-complement digits,
// p is 2N+1 digits (digit i in bits [3i+2:3i]).
module qsd_mult_iter
  import qsd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [DIGIT_W*N-1:0]       a,
  input  logic [DIGIT_W*N-1:0]       b,
  output logic                       busy,
  output logic                       done,
  output logic [DIGIT_W*(2*N+1)-1:0] p
);

  localparam int unsigned CNT_W = (N > 1) ? $clog2(N) : 1;

  logic [DIGIT_W*N-1:0]       a_q;
  logic [DIGIT_W*N-1:0]       b_q;      // remaining multiplier digits, LSB first
  logic [CNT_W-1:0]           cnt;      // current iteration j
  logic [DIGIT_W*(N+1)-1:0]   pp;       // A * B_j
  logic [DIGIT_W*2*N-1:0]     pp_sh;    // A * B_j * 4^j
  logic [DIGIT_W*2*N-1:0]     sum;
  qsd_carry_t                 sum_cout;

  qsd_ppgen #(.N(N)) u_ppgen (
    .a (a_q),
    .b (b_q[DIGIT_W-1:0]),
    .m (pp)
  );

  always_comb begin
    pp_sh = (DIGIT_W*2*N)'(pp);
    pp_sh = pp_sh << (DIGIT_W * cnt);
  end

  qsd_adder #(.N(2*N)) u_adder (
    .a    (p[DIGIT_W*2*N-1:0]),
    .b    (pp_sh),
    .s    (sum),
    .cout (sum_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      p    <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        p    <= {carry_to_digit(sum_cout), sum};
        b_q  <= b_q >> DIGIT_W;
        cnt  <= cnt + 1'b1;
        if (cnt == CNT_W'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        a_q  <= a;
        b_q  <= b;
        cnt  <= '0;
        busy <= 1'b1;
        p    <= '0;
      end
    end
  end

  // The accumulator's top digit must be free before each addition.
  assert property (@(posedge clk) disable iff (!rst_n)
                   busy |-> p[DIGIT_W*2*N +: DIGIT_W] == '0)
    else $error("qsd_mult_iter: accumulator overflow into its top digit");

endmodule
