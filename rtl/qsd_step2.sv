// qsd_step2: second-step QSD adder.
//
// Adds the intermediate carry a (-1..1) coming from the next lower digit to
// the intermediate sum b (-2..2) of this digit. The result lies in -3..3, so
// it is a single QSD digit and no carry leaves this stage; this is what makes
// the whole adder carry-free. The mapping is the published design's second-step table
// (15 input pairs); it is realised as a 3-bit two's-complement addition of the
// sign-extended carry and the sum, which gives exactly that table.
//
// Interface: a is a 2-bit two's-complement carry, b and s are 3-bit
// two's-complement digits. Purely combinational.
module qsd_step2
  import qsd_pkg::*;
(
  input  qsd_carry_t a,
  input  qsd_digit_t b,
  output qsd_digit_t s
);

  always_comb s = carry_to_digit(a) + b;

endmodule
