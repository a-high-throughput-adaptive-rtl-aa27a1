// tb_spt_quantiser: exhaustive test of the 2-SPT input quantiser.
// For every 8-bit input it checks three things. The code's value must be
// within the smallest error any 2-term SPT code can reach, found by trying
// every pair of terms. The value must equal the reference greedy
// approximation, found by a nearest-power search. Zero terms must carry a
// zero exponent. It also counts the inputs that 2-SPT represents exactly.
module tb_spt_quantiser;
  import dfe_pkg::*;
  import dfe_tb_pkg::*;

  logic signed [IN_W-1:0] x;
  spt_t q;
  int checks = 0, failures = 0;

  spt_quantiser u_dut (.x(x), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int term_val(pot_t t);
    if (!t.nz) return 0;
    return t.neg ? -(1 << t.exp) : (1 << t.exp);
  endfunction

  initial begin
    automatic int n_exact = 0;
    for (int v = -(1 << (IN_W - 1)); v < (1 << (IN_W - 1)); v++) begin
      automatic int val, best, err;
      x = IN_W'(v);
      #1;
      val = 0;
      for (int t = 0; t < int'(SPT_N); t++) val += term_val(q[t]);
      best = 1 << 30;
      for (int a = -int'(EXP_MAX) - 2; a <= int'(EXP_MAX); a++)
        for (int b = -int'(EXP_MAX) - 2; b <= int'(EXP_MAX); b++) begin
          // a, b index the candidate terms: -1 is zero, 0..7 positive, -9..-2 negative
          automatic int ta = (a == -1) ? 0 : (a >= 0 ? (1 << a) : -(1 << (-a - 2)));
          automatic int tb = (b == -1) ? 0 : (b >= 0 ? (1 << b) : -(1 << (-b - 2)));
          automatic int e = v - ta - tb;
          if (e < 0) e = -e;
          if (e < best) best = e;
        end
      err = (v > val) ? v - val : val - v;
      checks++;
      if (err != best) begin
        failures++;
        $display("FAIL x=%0d code value=%0d error=%0d best=%0d", v, val, err, best);
      end
      checks++;
      if (val != spt_value(v)) begin
        failures++;
        $display("FAIL x=%0d code value=%0d reference=%0d", v, val, spt_value(v));
      end
      for (int t = 0; t < int'(SPT_N); t++) begin
        checks++;
        if (!q[t].nz && q[t].exp != 0) failures++;
      end
      if (err == 0) n_exact++;
    end
    $display("exactly represented inputs: %0d of %0d", n_exact, 1 << IN_W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
