// tb_dfe_pm: cycle-level test of one processing module with random inputs.
// A model in the testbench keeps its own copy of the two weights and of the
// pipeline registers. Each clock it checks the registered outputs: data out
// two cycles after data in, error and partial sum one cycle after, the sum
// y_in + x_f conj(w_f) + d conj(w_b), and both weight updates. Updates are
// made only when e_upd is set. Large errors are sent in bursts so that the
// weights also reach saturation.
module tb_dfe_pm;
  import dfe_pkg::*;
  import dfe_tb_pkg::*;

  localparam int W = 16, FRAC_X = 5, MU_SHIFT = 4, Y_W = 30;
  localparam int SH = FRAC_X + MU_SHIFT;

  logic clk = 1'b0, rst_n = 1'b0;
  cspt_t xf_in, xf_out, xu_in, xu_out;
  logic signed [W-1:0] e_re_in, e_im_in, e_re_out, e_im_out;
  logic e_upd_in, e_upd_out;
  logic signed [Y_W-1:0] y_re_in, y_im_in, y_re_out, y_im_out;
  dec_t d_in, db_in;
  logic signed [W-1:0] wf_re, wf_im, wb_re, wb_im;

  dfe_pm #(.W(W), .FRAC_X(FRAC_X), .MU_SHIFT(MU_SHIFT), .Y_W(Y_W)) u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_upd = 0, n_hold = 0, n_wsat = 0;
  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint sval(spt_t s);
    longint v = 0;
    for (int t = 0; t < int'(SPT_N); t++)
      if (s[t].nz) v += s[t].neg ? -(longint'(1) << s[t].exp) : (longint'(1) << s[t].exp);
    return v;
  endfunction

  function automatic longint dval(dec_t d, bit im);
    if (!d.valid) return 0;
    return (im ? d.sym.im_neg : d.sym.re_neg) ? -(longint'(1) << FRAC_X) : (longint'(1) << FRAC_X);
  endfunction

  function automatic int wsat(longint v, ref int n);
    bit s;
    int r = sat_int(v, W, s);
    if (s) n++;
    return r;
  endfunction

  initial begin
    automatic int mwf_re = 0, mwf_im = 0, mwb_re = 0, mwb_im = 0;
    automatic cspt_t xf_h1 = '0, xf_h2 = '0, xu_h1 = '0, xu_h2 = '0;
    automatic longint exp_yr, exp_yi;
    automatic int exp_er, exp_ei;
    automatic bit exp_eu;
    xf_in = '0; xu_in = '0; e_re_in = '0; e_im_in = '0; e_upd_in = 1'b0;
    y_re_in = '0; y_im_in = '0; d_in = '0; db_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      automatic longint a_r, a_i, u_r, u_i, d_r, d_i, b_r, b_i;
      automatic bit big = ((t / 500) % 4 == 3);
      @(negedge clk);
      xf_in = $urandom; xu_in = $urandom;
      e_re_in = big ? W'($urandom) : W'($signed($urandom_range(0, 4000)) - 2000);
      e_im_in = big ? W'($urandom) : W'($signed($urandom_range(0, 4000)) - 2000);
      e_upd_in = ($urandom_range(0, 3) != 0);
      y_re_in = Y_W'($signed($urandom_range(0, 1 << 22)) - (1 << 21));
      y_im_in = Y_W'($signed($urandom_range(0, 1 << 22)) - (1 << 21));
      d_in = $urandom; db_in = $urandom;
      #1;
      // model: outputs after the coming clock edge
      a_r = sval(xf_in.re); a_i = sval(xf_in.im);
      u_r = sval(xu_in.re); u_i = sval(xu_in.im);
      d_r = dval(d_in, 0); d_i = dval(d_in, 1);
      b_r = dval(db_in, 0); b_i = dval(db_in, 1);
      exp_yr = longint'(y_re_in) + a_r * mwf_re + a_i * mwf_im + d_r * mwb_re + d_i * mwb_im;
      exp_yi = longint'(y_im_in) + a_i * mwf_re - a_r * mwf_im + d_i * mwb_re - d_r * mwb_im;
      exp_er = int'(e_re_in); exp_ei = int'(e_im_in); exp_eu = e_upd_in;
      if (e_upd_in) begin
        automatic int n = 0;
        mwf_re = wsat(longint'(mwf_re) + ((u_r * e_re_in + u_i * e_im_in) >>> SH), n);
        mwf_im = wsat(longint'(mwf_im) + ((u_i * e_re_in - u_r * e_im_in) >>> SH), n);
        mwb_re = wsat(longint'(mwb_re) + ((b_r * e_re_in + b_i * e_im_in) >>> SH), n);
        mwb_im = wsat(longint'(mwb_im) + ((b_i * e_re_in - b_r * e_im_in) >>> SH), n);
        n_wsat += n;
        n_upd++;
      end else n_hold++;
      xf_h2 = xf_h1; xf_h1 = xf_in; xu_h2 = xu_h1; xu_h1 = xu_in;
      @(posedge clk);
      #1;
      check(longint'(y_re_out) == exp_yr && longint'(y_im_out) == exp_yi, "partial sum");
      check(int'(e_re_out) == exp_er && int'(e_im_out) == exp_ei && e_upd_out == exp_eu, "error pipe");
      check(xf_out == xf_h2 && xu_out == xu_h2, "data pipe z^-2");
      check(int'(wf_re) == mwf_re && int'(wf_im) == mwf_im, "ff weight");
      check(int'(wb_re) == mwb_re && int'(wb_im) == mwb_im, "fb weight");
    end
    $display("updates=%0d holds=%0d weight saturations=%0d", n_upd, n_hold, n_wsat);
    check(n_upd > 0 && n_hold > 0 && n_wsat > 0, "all cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
