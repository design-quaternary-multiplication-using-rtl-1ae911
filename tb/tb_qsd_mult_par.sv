// tb_qsd_mult_par: self-checking test of the parallel QSD multiplier.
//  * N = 4 (default): all 7^4 x 7^4 digit combinations; the 9-digit product
//    must equal A * B with legal digits. The first-level adders' carry-outs
//    are observed and each must be nonzero at least once.
//  * N = 8: 100,000 random and extreme operand pairs against the 17-digit
//    product, exercising a three-level reduction tree.
module tb_qsd_mult_par;
  import qsd_pkg::*;
  import qsd_tb_pkg::*;

  localparam int TRIALS8 = 100000;

  logic [11:0] a, b;
  logic [26:0] r;
  logic [23:0] a8, b8;
  logic [50:0] r8;
  int checks = 0, failures = 0, cout_a_seen = 0, cout_b_seen = 0;

  qsd_mult_par dut (.a(a), .b(b), .r(r));
  qsd_mult_par #(.N(8)) dut8 (.a(a8), .b(b8), .r(r8));

  function automatic logic [11:0] digits_of(int k);
    logic [11:0] v;
    for (int i = 0; i < 4; i++) begin
      v[3*i +: 3] = 3'((k % 7) - 3);
      k = k / 7;
    end
    return v;
  endfunction

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0;
    b8 = '0;
    for (int ka = 0; ka < 2401; ka++) begin
      longint va;
      a  = digits_of(ka);
      va = longint'(value(vec_t'(a), 4));
      for (int kb = 0; kb < 2401; kb++) begin
        longint vr, ve;
        b = digits_of(kb);
        #1;
        ve = va * longint'(value(vec_t'(b), 4));
        vr = longint'(value(vec_t'(r), 9));
        checks++;
        if (vr != ve || !legal(vec_t'(r), 9)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h: r=%h (value %0d, expected %0d)", a, b, r, vr, ve);
        end
        if (dut.g_lvl[1].g_reduce.g_term[0].cout != '0) cout_a_seen++;
        if (dut.g_lvl[1].g_reduce.g_term[1].cout != '0) cout_b_seen++;
      end
    end
    checks++;
    if (cout_a_seen == 0 || cout_b_seen == 0) failures++;
    $display("N=4: level-1 carry-outs nonzero: low %0d, high %0d", cout_a_seen, cout_b_seen);

    for (int t = 0; t < TRIALS8; t++) begin
      wide_t ve;
      a8 = 24'(rand_vec(8, (t < 9) ? t % 3 : 0));
      b8 = 24'(rand_vec(8, (t < 9) ? t / 3 : 0));
      #1;
      ve = value(vec_t'(a8), 8) * value(vec_t'(b8), 8);
      checks++;
      if (value(vec_t'(r8), 17) != ve || !legal(vec_t'(r8), 17)) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 a=%h b=%h: r=%h", a8, b8, r8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
