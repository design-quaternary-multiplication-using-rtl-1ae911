// qsd_pkg: shared types and helpers for the quaternary signed-digit (QSD)
// arithmetic blocks.
//
// A QSD number is a string of digits x_i, each in -3..3, worth sum(x_i * 4^i).
// Every digit is carried as a 3-bit two's-complement field; the pattern 3'b100
// (-4) is never produced and is not a legal input. Multi-digit numbers are
// packed flat, digit i in bits [3i+2:3i], the same ordering as the A[11..0] /
// B[11..0] / R[26..0] buses of the 4x4 multiplier. An intermediate carry
// between adder digits lies in -1..1 and is carried on 2 bits.
package qsd_pkg;

  localparam int unsigned DIGIT_W = 3;  // bits per QSD digit
  localparam int unsigned CARRY_W = 2;  // bits per adder carry (-1..1)

  typedef logic signed [DIGIT_W-1:0] qsd_digit_t;
  typedef logic signed [CARRY_W-1:0] qsd_carry_t;

  // Sign-extend a 2-bit carry into a 3-bit digit (used where a carry-out
  // becomes the top digit of a wider operand, as in the 4x4 multiplier).
  function automatic qsd_digit_t carry_to_digit(qsd_carry_t c);
    return {c[1], c};
  endfunction

endpackage
