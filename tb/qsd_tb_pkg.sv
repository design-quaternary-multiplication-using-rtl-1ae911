// qsd_tb_pkg: reference helpers shared by the QSD testbenches.
//
// Values are computed here with plain integer arithmetic, independent of the
// design: a packed QSD number (3-bit two's-complement digits, digit i in bits
// [3i+2:3i]) is worth sum(d_i * 4^i). Wide values use a 200-bit signed type,
// enough for 66 digits.
package qsd_tb_pkg;

  localparam int unsigned MAXD = 66;
  typedef logic signed [199:0] wide_t;
  typedef logic [3*MAXD-1:0]   vec_t;

  // Signed value of digit i of a packed vector.
  function automatic int digit(vec_t v, int i);
    return int'($signed(v[3*i +: 3]));
  endfunction

  // Value of the lowest n digits of a packed vector.
  function automatic wide_t value(vec_t v, int n);
    wide_t acc = '0;
    for (int i = n - 1; i >= 0; i--) acc = acc * 4 + wide_t'(digit(v, i));
    return acc;
  endfunction

  // 1 if all of the lowest n digits are legal (-3..3, i.e. not 3'b100).
  function automatic bit legal(vec_t v, int n);
    for (int i = 0; i < n; i++) if (v[3*i +: 3] == 3'b100) return 1'b0;
    return 1'b1;
  endfunction

  // Random legal digit -3..3 as a 3-bit pattern.
  function automatic logic [2:0] rand_digit();
    return 3'(int'($urandom_range(6)) - 3);
  endfunction

  // Random n-digit QSD number; mode 0: uniform digits, 1: all +3,
  // 2: all -3, 3: digits from {+-2, +-3} only (long carry patterns).
  function automatic vec_t rand_vec(int n, int mode);
    vec_t v = '0;
    for (int i = 0; i < n; i++) begin
      case (mode)
        1:       v[3*i +: 3] = 3'd3;
        2:       v[3*i +: 3] = 3'b101;
        3:       v[3*i +: 3] = ($urandom_range(1) == 1) ? 3'(2 + $urandom_range(1))
                                                        : 3'(-(2 + int'($urandom_range(1))));
        default: v[3*i +: 3] = rand_digit();
      endcase
    end
    return v;
  endfunction

endpackage
