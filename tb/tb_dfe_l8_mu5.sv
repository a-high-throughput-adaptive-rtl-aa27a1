// tb_dfe_l8_mu5: convergence test of the (8,8) equaliser at beta = 2^-5.
//
// The stimulus and checks are those of tb_dlms_dfe: QPSK through a 3-tap
// channel with an eigenvalue spread of about 46.8, at Eb/N0 = 20 dB. There
// are 500 training symbols, then data, idle and retraining phases. Outputs
// and weights are compared exactly with the equation-level DLMS model. After
// training the mean squared error must have dropped tenfold, and every data
// decision must match the sent symbol.
module tb_dfe_l8_mu5;
  import dfe_pkg::*;
  import dfe_tb_pkg::*;

  localparam int L = 8, W = 16, W_FRAC = 13, FRAC_X = 5;
  localparam int MU_SHIFT = 5;
  localparam int DELAY = 3;     // training target s(m-DELAY)
  localparam real GAIN = 0.5;   // receiver gain ahead of the 8-bit input
  localparam int N_TR1 = 500, N_DATA = 300, N_IDLE = 20, N_TR2 = 60, N_END = 4 * L;
  localparam int N_TOT = N_TR1 + N_DATA + N_IDLE + N_TR2 + N_END;
  localparam int Y_W = W + int'(EXP_MAX) + 3 + $clog2(2 * L);

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [IN_W-1:0] x_re, x_im;
  sym_mode_e mode;
  qpsk_t train_sym;
  logic signed [Y_W-1:0] y_re, y_im;
  sym_mode_e y_mode;
  dec_t dec;
  logic signed [W-1:0] e_re, e_im;
  logic e_sat;
  logic [L-1:0][W-1:0] wf_re, wf_im, wb_re, wb_im;

  dlms_dfe #(.L(L), .W(W), .W_FRAC(W_FRAC), .FRAC_X(FRAC_X), .MU_SHIFT(MU_SHIFT)) u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  initial begin : watchdog
    repeat (N_TOT + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  DfeRef    rm;
  Channel   ch;
  ref_out_t exp_q[N_TOT];
  bit       sent_re[N_TOT], sent_im[N_TOT];
  sym_mode_e mode_of[N_TOT];

  function automatic sym_mode_e mode_at(int m);
    if (m < N_TR1) return SYM_TRAIN;
    if (m < N_TR1 + N_DATA) return SYM_DATA;
    if (m < N_TR1 + N_DATA + N_IDLE) return SYM_IDLE;
    if (m < N_TR1 + N_DATA + N_IDLE + N_TR2) return SYM_TRAIN;
    return SYM_IDLE;
  endfunction

  task automatic compare_weights(input string tag);
    for (int p = 0; p < L; p++) begin
      check(int'($signed(wf_re[p])) == rm.wf_re[p] && int'($signed(wf_im[p])) == rm.wf_im[p], {tag, " wf"});
      check(int'($signed(wb_re[p])) == rm.wb_re[L-1-p] && int'($signed(wb_im[p])) == rm.wb_im[L-1-p], {tag, " wb"});
    end
  endtask

  initial begin : stim
    automatic int xr, xi;
    automatic bit tr, ti;
    automatic int first_out = -1;
    automatic int n_train = 0, n_data = 0, n_idle = 0, n_sw_td = 0, n_sw_dt = 0, n_sat = 0;
    automatic int n_sym_err = 0, n_frozen_checks = 0;
    automatic real mse_early = 0.0, mse_late = 0.0;
    automatic logic [L-1:0][W-1:0] snap_f, snap_b;
    automatic sym_mode_e prev_mode = SYM_IDLE;

    rm = new(L, W, W_FRAC, FRAC_X, MU_SHIFT);
    ch = new(0.0707, FRAC_X, GAIN);
    x_re = '0; x_im = '0; mode = SYM_IDLE; train_sym = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int t = 0; t < N_TOT + L - 1; t++) begin
      // drive index t
      if (t < N_TOT) begin
        mode_of[t] = mode_at(t);
        if (mode_of[t] == SYM_IDLE) begin xr = 0; xi = 0; tr = 0; ti = 0; end
        else begin ch.next(xr, xi); ch.sym(DELAY, tr, ti); end
        sent_re[t] = tr; sent_im[t] = ti;
        x_re = IN_W'(xr); x_im = IN_W'(xi); mode = mode_of[t]; train_sym = '{re_neg: tr, im_neg: ti};
        exp_q[t] = rm.step(xr, xi, mode_of[t], tr, ti);
      end else begin
        x_re = '0; x_im = '0; mode = SYM_IDLE; train_sym = '0;
      end
      @(posedge clk);
      cycles++;
      #1;
      // after posedge t+1 the output holds index t+1-L
      if (t + 1 - L >= 0) begin
        automatic int m = t + 1 - L;
        automatic ref_out_t o = exp_q[m];
        if (first_out < 0 && y_mode != SYM_IDLE) first_out = t + 1;
        check(int'(y_mode) == o.mode, "mode");
        check(longint'(y_re) == o.y_re && longint'(y_im) == o.y_im, "y");
        check(dec.valid == o.d_valid, "dec valid");
        if (o.d_valid) check(dec.sym.re_neg == o.d_re_neg && dec.sym.im_neg == o.d_im_neg, "dec");
        check(int'(e_re) == o.e_re && int'(e_im) == o.e_im && e_sat == o.e_sat, "error");
        if (y_mode == SYM_TRAIN) n_train++;
        if (y_mode == SYM_DATA) n_data++;
        if (y_mode == SYM_IDLE) n_idle++;
        if (prev_mode == SYM_TRAIN && y_mode == SYM_DATA) n_sw_td++;
        if (prev_mode != SYM_TRAIN && y_mode == SYM_TRAIN && m > 0) n_sw_dt++;
        if (e_sat) n_sat++;
        prev_mode = y_mode;
        if (m < 20) mse_early += (real'(e_re) ** 2 + real'(e_im) ** 2) / (2.0 ** (2 * W_FRAC)) / 20.0;
        if (m >= N_TR1 - 100 && m < N_TR1)
          mse_late += (real'(e_re) ** 2 + real'(e_im) ** 2) / (2.0 ** (2 * W_FRAC)) / 100.0;
        if (y_mode == SYM_DATA && (dec.sym.re_neg != sent_re[m] || dec.sym.im_neg != sent_im[m])) n_sym_err++;
        // weights must hold still while data symbols are processed
        if (m == N_TR1 + 2 * L) begin snap_f = wf_re; snap_b = wb_im; compare_weights("after training"); end
        if (m > N_TR1 + 2 * L && m < N_TR1 + N_DATA) begin
          check(wf_re == snap_f && wb_im == snap_b, "weights frozen");
          n_frozen_checks++;
        end
      end
      // the first full-window output (index L-1) is out after 2L-1 clocks
      if (t + 1 == 2 * L - 1) check(y_mode == SYM_TRAIN && longint'(y_re) == exp_q[L-1].y_re, "latency 2L-1");
    end
    rm.flush();
    compare_weights("final");

    check(first_out == L, "first output after L cycles");
    check(mse_late < 0.1 * mse_early, "mse reduced by training");
    check(n_sym_err == 0, "data decisions");
    $display("mechanisms: train=%0d data=%0d idle=%0d switch_train_to_data=%0d switch_to_train=%0d frozen_checks=%0d inexact_spt=%0d err_sat=%0d",
             n_train, n_data, n_idle, n_sw_td, n_sw_dt, n_frozen_checks, rm.n_inexact, n_sat);
    $display("mse first 20 = %f, last 100 training = %f, data symbol errors = %0d", mse_early, mse_late, n_sym_err);
    check(n_train > 0, "training happened");
    check(n_data > 0, "data mode happened");
    check(n_idle > 0, "idle happened");
    check(n_sw_td > 0, "switch train->data happened");
    check(n_sw_dt > 0, "switch back to training happened");
    check(n_frozen_checks > 0, "frozen weights checked");
    check(rm.n_inexact > 0, "inexact 2-SPT samples happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
