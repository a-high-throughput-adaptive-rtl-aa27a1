// tb_dfe_decide: random test of the decision device and error summer. It
// covers all three modes, outputs near +-1+-j, zero components, and outputs
// large enough to drive the error into saturation. Expected values come from
// the formulas in dfe_tb_pkg.
module tb_dfe_decide;
  import dfe_pkg::*;
  import dfe_tb_pkg::*;

  localparam int W = 16, W_FRAC = 13, FRAC_X = 5, Y_W = 30;
  logic signed [Y_W-1:0] yr, yi;
  sym_mode_e mode;
  qpsk_t ts;
  dec_t d;
  logic signed [W-1:0] er, ei;
  logic upd, sat;
  int checks = 0, failures = 0, n_sat = 0;
  int n_mode[3] = '{0, 0, 0};

  dfe_decide #(.W(W), .W_FRAC(W_FRAC), .FRAC_X(FRAC_X), .Y_W(Y_W)) u_dut (
    .y_re(yr), .y_im(yi), .mode(mode), .train_sym(ts), .d(d), .e_re(er), .e_im(ei),
    .e_upd(upd), .sat(sat));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      automatic longint one = longint'(1) << (W_FRAC + FRAC_X);
      automatic longint dr, di;
      automatic bit s1, s2, vr, xre_neg, xim_neg;
      automatic int xr, xi;
      if (i % 4 == 0) begin
        yr = Y_W'($signed($urandom)); yi = Y_W'($signed($urandom));
      end else begin
        yr = Y_W'($signed($urandom_range(0, 1 << 21)) - (1 << 20)) + ((i % 2) ? Y_W'(one) : -Y_W'(one));
        yi = Y_W'($signed($urandom_range(0, 1 << 21)) - (1 << 20));
      end
      if (i % 97 == 0) yr = '0;
      if (i % 89 == 0) yi = '0;
      mode = sym_mode_e'($urandom_range(0, 2));
      ts = $urandom;
      #1;
      n_mode[int'(mode)]++;
      vr = (mode != SYM_IDLE);
      xre_neg = (mode == SYM_TRAIN) ? ts.re_neg : (yr < 0);
      xim_neg = (mode == SYM_TRAIN) ? ts.im_neg : (yi < 0);
      dr = !vr ? 0 : (xre_neg ? -one : one);
      di = !vr ? 0 : (xim_neg ? -one : one);
      xr = sat_int((dr - longint'(yr)) >>> FRAC_X, W, s1);
      xi = sat_int((di - longint'(yi)) >>> FRAC_X, W, s2);
      checks++;
      if (d.valid != vr || (vr && (d.sym.re_neg != xre_neg || d.sym.im_neg != xim_neg))
          || upd != (mode == SYM_TRAIN)) begin
        failures++;
        if (failures < 10) $display("FAIL decision y=%0d,%0d mode=%0d", yr, yi, mode);
      end
      checks++;
      if (int'(er) != xr || int'(ei) != xi || sat != (s1 | s2)) begin
        failures++;
        if (failures < 10) $display("FAIL error y=%0d,%0d e=%0d,%0d exp %0d,%0d", yr, yi, er, ei, xr, xi);
      end
      if (sat) n_sat++;
    end
    checks++;
    if (n_sat == 0 || n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) failures++;
    $display("saturated: %0d, modes idle/train/data: %0d/%0d/%0d", n_sat, n_mode[0], n_mode[1], n_mode[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
