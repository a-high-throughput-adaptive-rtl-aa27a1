// dlms_dfe: pipelined adaptive decision feedback equaliser, trained with the
// delayed LMS (DLMS) algorithm, with 2-SPT coded input data. It takes one
// complex sample per clock and gives one equalised output per clock.
//
// A DFE trained with plain LMS has two loops that must close in one sample
// period. The error must come back to every weight, and each decision must
// come back to the feedback filter. Here the weight update uses the error
// from D = L samples ago. With that delay the filter can be cut into L
// identical processing modules (dfe_pm), with registers between them. The
// module boundaries are:
//   feedforward data  x_f(n) enters PM 0 and moves right, 2 cycles per PM;
//   update data       x_f(n-L), from an L-stage delay line, moves the same way;
//   partial sum       y_i moves right, 1 cycle per PM;
//   error             e(n-L) enters PM 0 and moves right, 1 cycle per PM;
//   decisions         d(n-L) and d(n-2L) go to every PM at once.
// PM i holds w_f^i and w_b^(L-1-i). The feedback weights are in reverse order,
// so the error a PM needs for its feedback weight is the one it already has
// for its feedforward weight. The only global signals are the two decisions.
// The output register of the last PM holds y(n-L). The decision device and
// the error summer read it, and their results d(n-L) and e(n-L) go back in
// the same cycle. dfe_decide holds the slicer and the summer.
//
// Input samples are quantised to 2-SPT once, at the input (spt_quantiser),
// so every multiplier is a pair of barrel shifters and an adder.
//
// Timing: output y(m) leaves the output register L cycles after sample
// x_f(m) entered. After reset, the first output whose feedforward window holds
// L real samples appears 2L-1 cycles after the first sample. The weights for
// y(m) hold every update from errors e(j), j <= m-L-1.
//
// Modes: each sample carries a mode and a training symbol for its own index.
// Both are delayed L cycles inside, to line up with y. In SYM_TRAIN the
// training symbol is the reference d, for both the error and the decision
// feedback, and the weights adapt. In SYM_DATA the slicer decision is d and
// the weights hold. In SYM_IDLE no symbol is present: the decision feeds back
// as zero and nothing adapts. The document sets the structure, the delays,
// the update equations, the 2-SPT input and L, W and beta. The word
// formats, the modes and the reset values are this design's own.
//
// Formats: x_re/x_im are IN_W-bit integers with FRAC_X fraction bits
// (1.0 = 2^FRAC_X). Weights and errors have W bits, W_FRAC of them fraction
// bits. y has W_FRAC+FRAC_X fraction bits. beta = 2^-MU_SHIFT.
module dlms_dfe
  import dfe_pkg::*;
#(
  parameter int unsigned L        = 8,
  parameter int unsigned W        = 16,
  parameter int unsigned W_FRAC   = 13,
  parameter int unsigned FRAC_X   = 5,
  parameter int unsigned MU_SHIFT = 4,
  localparam int unsigned Y_W     = W + EXP_MAX + 3 + $clog2(2 * L)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [IN_W-1:0]      x_re,
  input  logic signed [IN_W-1:0]      x_im,
  input  sym_mode_e                   mode,
  input  qpsk_t                       train_sym,
  output logic signed [Y_W-1:0]       y_re,
  output logic signed [Y_W-1:0]       y_im,
  output sym_mode_e                   y_mode,
  output dec_t                        dec,
  output logic signed [W-1:0]         e_re,
  output logic signed [W-1:0]         e_im,
  output logic                        e_sat,
  output logic [L-1:0][W-1:0]         wf_re,
  output logic [L-1:0][W-1:0]         wf_im,
  output logic [L-1:0][W-1:0]         wb_re,
  output logic [L-1:0][W-1:0]         wb_im
);

  // ---- input quantiser ----
  cspt_t xq;
  spt_quantiser u_q_re (.x(x_re), .q(xq.re));
  spt_quantiser u_q_im (.x(x_im), .q(xq.im));

  // ---- L-stage delay lines: update data x_f(n-L), mode/training symbol ----
  typedef struct packed {
    sym_mode_e mode;
    qpsk_t     sym;
  } tag_t;

  cspt_t xu_line  [L];
  tag_t  tag_line [L];
  dec_t  d_line   [L];
  dec_t  d_now;      // d(n-L)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) begin
        xu_line[k]  <= '0;
        tag_line[k] <= '{mode: SYM_IDLE, sym: '0};
        d_line[k]   <= '0;
      end
    end else begin
      xu_line[0]  <= xq;
      tag_line[0] <= '{mode: mode, sym: train_sym};
      d_line[0]   <= d_now;
      for (int k = 1; k < L; k++) begin
        xu_line[k]  <= xu_line[k-1];
        tag_line[k] <= tag_line[k-1];
        d_line[k]   <= d_line[k-1];
      end
    end
  end

  // ---- PM chain ----
  cspt_t               xf_c [L+1];
  cspt_t               xu_c [L+1];
  logic signed [W-1:0] er_c [L+1];
  logic signed [W-1:0] ei_c [L+1];
  logic                eu_c [L+1];
  logic signed [Y_W-1:0] yr_c [L+1];
  logic signed [Y_W-1:0] yi_c [L+1];
  logic signed [W-1:0] e_re_n, e_im_n;
  logic                e_upd_n;

  assign xf_c[0] = xq;
  assign xu_c[0] = xu_line[L-1];
  assign er_c[0] = e_re_n;
  assign ei_c[0] = e_im_n;
  assign eu_c[0] = e_upd_n;
  assign yr_c[0] = '0;
  assign yi_c[0] = '0;

  for (genvar i = 0; i < L; i++) begin : g_pm
    dfe_pm #(.W(W), .FRAC_X(FRAC_X), .MU_SHIFT(MU_SHIFT), .Y_W(Y_W)) u_pm (
      .clk, .rst_n,
      .xf_in(xf_c[i]), .xf_out(xf_c[i+1]),
      .xu_in(xu_c[i]), .xu_out(xu_c[i+1]),
      .e_re_in(er_c[i]), .e_im_in(ei_c[i]), .e_upd_in(eu_c[i]),
      .e_re_out(er_c[i+1]), .e_im_out(ei_c[i+1]), .e_upd_out(eu_c[i+1]),
      .y_re_in(yr_c[i]), .y_im_in(yi_c[i]), .y_re_out(yr_c[i+1]), .y_im_out(yi_c[i+1]),
      .d_in(d_now), .db_in(d_line[L-1]),
      .wf_re(wf_re[i]), .wf_im(wf_im[i]), .wb_re(wb_re[i]), .wb_im(wb_im[i]));
  end

  // ---- decision device, reference selection and error summer ----
  dfe_decide #(.W(W), .W_FRAC(W_FRAC), .FRAC_X(FRAC_X), .Y_W(Y_W)) u_decide (
    .y_re(yr_c[L]), .y_im(yi_c[L]), .mode(tag_line[L-1].mode), .train_sym(tag_line[L-1].sym),
    .d(d_now), .e_re(e_re_n), .e_im(e_im_n), .e_upd(e_upd_n), .sat(e_sat));

  assign y_re   = yr_c[L];
  assign y_im   = yi_c[L];
  assign y_mode = tag_line[L-1].mode;
  assign dec    = d_now;
  assign e_re   = e_re_n;
  assign e_im   = e_im_n;

endmodule
