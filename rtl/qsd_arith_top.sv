// qsd_arith_top: QSD arithmetic unit.
//
// Three independent units stand side by side, each with its own ports:
//  * add_*: an ADD_DIGITS-digit carry-free QSD adder / borrow-free subtractor
//    (qsd_addsub); combinational, constant delay for any width;
//  * mul_*: the MUL_DIGITS x MUL_DIGITS-digit parallel QSD multiplier
//    (qsd_mult_par), built from partial product generators and a binary tree
//    of QSD adders; combinational;
//  * it_*: the iterative add-shift QSD multiplier of the same size
//    (qsd_mult_iter); one iteration per clock, MUL_DIGITS cycles from start
//    to done.
// Grouping the adder/subtractor and the multipliers into one arithmetic unit
// follows the published design; bringing each unit out on its own ports, with no shared
// operation select, is this implementation's choice.
//
// All operands are packed QSD numbers, 3-bit two's-complement digits, digit i
// in bits [3i+2:3i]; products have 2*MUL_DIGITS+1 digits. Parameters:
// ADD_DIGITS (default 64, a 128-bit-equivalent adder), MUL_DIGITS (default 4,
// the published 4x4 multiplier; a power of two).
module qsd_arith_top
  import qsd_pkg::*;
#(
  parameter int unsigned ADD_DIGITS = 64,
  parameter int unsigned MUL_DIGITS = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // adder / subtractor
  input  logic [DIGIT_W*ADD_DIGITS-1:0]  add_a,
  input  logic [DIGIT_W*ADD_DIGITS-1:0]  add_b,
  input  logic                           add_sub,
  output logic [DIGIT_W*ADD_DIGITS-1:0]  add_s,
  output logic [CARRY_W-1:0]             add_cout,
  // parallel multiplier
  input  logic [DIGIT_W*MUL_DIGITS-1:0]     mul_a,
  input  logic [DIGIT_W*MUL_DIGITS-1:0]     mul_b,
  output logic [DIGIT_W*(2*MUL_DIGITS+1)-1:0] mul_r,
  // iterative multiplier
  input  logic                           it_start,
  input  logic [DIGIT_W*MUL_DIGITS-1:0]     it_a,
  input  logic [DIGIT_W*MUL_DIGITS-1:0]     it_b,
  output logic                           it_busy,
  output logic                           it_done,
  output logic [DIGIT_W*(2*MUL_DIGITS+1)-1:0] it_p
);

  qsd_addsub #(.N(ADD_DIGITS)) u_addsub (
    .a    (add_a),
    .b    (add_b),
    .sub  (add_sub),
    .s    (add_s),
    .cout (add_cout)
  );

  qsd_mult_par #(.N(MUL_DIGITS)) u_mult_par (
    .a (mul_a),
    .b (mul_b),
    .r (mul_r)
  );

  qsd_mult_iter #(.N(MUL_DIGITS)) u_mult_iter (
    .clk   (clk),
    .rst_n (rst_n),
    .start (it_start),
    .a     (it_a),
    .b     (it_b),
    .busy  (it_busy),
    .done  (it_done),
    .p     (it_p)
  );

endmodule
