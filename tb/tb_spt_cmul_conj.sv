// tb_spt_cmul_conj: random test of the complex product x * conj(c), worked out
// in integer complex arithmetic from the SPT values of x.
module tb_spt_cmul_conj;
  import dfe_pkg::*;

  localparam int W = 16;
  localparam int P = W + int'(EXP_MAX) + 2;

  spt_t xr, xi;
  logic signed [W-1:0] cr, ci;
  logic signed [P:0] pr, pi;
  int checks = 0, failures = 0;

  spt_cmul_conj #(.W(W), .N_TERMS(SPT_N)) u_dut (
    .x_re(xr), .x_im(xi), .c_re(cr), .c_im(ci), .p_re(pr), .p_im(pi));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sval(spt_t s);
    longint v = 0;
    for (int t = 0; t < int'(SPT_N); t++)
      if (s[t].nz) v += s[t].neg ? -(longint'(1) << s[t].exp) : (longint'(1) << s[t].exp);
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      automatic longint a, b;
      xr = $urandom; xi = $urandom; cr = $urandom; ci = $urandom;
      #1;
      a = sval(xr); b = sval(xi);
      checks++;
      if (longint'(pr) != a * cr + b * ci) begin
        failures++;
        if (failures < 10) $display("FAIL re %0d", pr);
      end
      checks++;
      if (longint'(pi) != b * cr - a * ci) begin
        failures++;
        if (failures < 10) $display("FAIL im %0d", pi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
