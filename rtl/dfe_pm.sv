// dfe_pm: one processing module (PM) of the pipelined DLMS decision feedback
// equaliser. A chain of L identical PMs forms the whole filter. Module i
// holds feedforward weight w_f^i and feedback weight w_b^(L-1-i).
//
// Per clock, with n the sample index of the cycle:
//   filter  y_i(n-i) = y_{i-1}(n-i) + x_f(n-2i) w_f*(n-i-1) + d(n-L) w_b*   (A2, M3, M4)
//   ff tap  w_f += beta * x_f(n-L-2i) e*(n-L-i)                              (M1, M2, A1)
//   fb tap  w_b += beta * x_b(n-2L+1) e*(n-L-i),  x_b(n-2L+1) = d(n-2L)      (M6, M5, A3)
// The partial sum and the error go to the next PM through one register. Both
// data streams, x_f(n-2i) and x_f(n-L-2i), go through two. So each PM is a
// pipeline stage, and the clock period is set by one PM's
// shift-multiply-add path, not by the whole filter.
//
// The input data is 2-SPT coded, so every product is a barrel shifter
// multiplier. The feedback datum +-1+-j is fed to the same multiplier as one
// POT term of exponent FRAC_X, which is 1.0 in the data scale. beta = 2^-MU_SHIFT is
// a plain right shift. It is merged with the FRAC_X rescale, so the update
// term is (x*conj(e)) >>> (FRAC_X+MU_SHIFT), truncating. Weights reset to 0
// and saturate at the W-bit range. A weight changes only when the error
// beside it carries e_upd (it came from a training symbol). Otherwise it
// holds, as in the document's fixed mode after training.
//
// The structure, the port timing and the update equations follow the
// document. Word formats, rounding, saturation and the update enable are this
// design's own.
//
// Interface: xf_in/xu_in/e_*_in/y_*_in come from the previous PM (or the
// equaliser input for PM 0); *_out go to the next. d_in and db_in are
// broadcast to all PMs. Weights are brought out for observation.
module dfe_pm
  import dfe_pkg::*;
#(
  parameter int unsigned W        = 16,
  parameter int unsigned FRAC_X   = 5,
  parameter int unsigned MU_SHIFT = 4,
  parameter int unsigned Y_W      = 30
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // feedforward data x_f(n-2i) and its copy for the update, x_f(n-L-2i)
  input  cspt_t                 xf_in,
  output cspt_t                 xf_out,
  input  cspt_t                 xu_in,
  output cspt_t                 xu_out,
  // error e(n-L-i) and its update enable
  input  logic signed [W-1:0]   e_re_in,
  input  logic signed [W-1:0]   e_im_in,
  input  logic                  e_upd_in,
  output logic signed [W-1:0]   e_re_out,
  output logic signed [W-1:0]   e_im_out,
  output logic                  e_upd_out,
  // partial output y_{i-1}(n-i) in, y_i(n-i-1) out
  input  logic signed [Y_W-1:0] y_re_in,
  input  logic signed [Y_W-1:0] y_im_in,
  output logic signed [Y_W-1:0] y_re_out,
  output logic signed [Y_W-1:0] y_im_out,
  // broadcast decisions d(n-L) and d(n-2L)
  input  dec_t                  d_in,
  input  dec_t                  db_in,
  // tap weights
  output logic signed [W-1:0]   wf_re,
  output logic signed [W-1:0]   wf_im,
  output logic signed [W-1:0]   wb_re,
  output logic signed [W-1:0]   wb_im
);

  localparam int unsigned P2_W = W + EXP_MAX + 2;  // spt_cmul_conj width, 2 terms
  localparam int unsigned P1_W = W + EXP_MAX + 1;  // spt_cmul_conj width, 1 term
  localparam int unsigned SH   = FRAC_X + MU_SHIFT;
  localparam logic [EXP_W-1:0] FX = EXP_W'(FRAC_X);

  // ---- pipeline registers (z^-2 for data, z^-1 for error and sum) ----
  cspt_t xf_d1, xu_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xf_d1     <= '0;
      xf_out    <= '0;
      xu_d1     <= '0;
      xu_out    <= '0;
      e_re_out  <= '0;
      e_im_out  <= '0;
      e_upd_out <= 1'b0;
    end else begin
      xf_d1     <= xf_in;
      xf_out    <= xf_d1;
      xu_d1     <= xu_in;
      xu_out    <= xu_d1;
      e_re_out  <= e_re_in;
      e_im_out  <= e_im_in;
      e_upd_out <= e_upd_in;
    end
  end

  // ---- feedback data as single POT terms ----
  pot_t [0:0] d_re, d_im, db_re, db_im;
  always_comb begin
    d_re[0]  = sign_pot(d_in.valid,  d_in.sym.re_neg,  FX);
    d_im[0]  = sign_pot(d_in.valid,  d_in.sym.im_neg,  FX);
    db_re[0] = sign_pot(db_in.valid, db_in.sym.re_neg, FX);
    db_im[0] = sign_pot(db_in.valid, db_in.sym.im_neg, FX);
  end

  // ---- filter: M3, M4, A2 ----
  logic signed [P2_W:0] m3_re, m3_im;
  logic signed [P1_W:0] m4_re, m4_im;

  spt_cmul_conj #(.W(W), .N_TERMS(SPT_N), .P_W(P2_W)) u_m3 (
    .x_re(xf_in.re), .x_im(xf_in.im), .c_re(wf_re), .c_im(wf_im),
    .p_re(m3_re), .p_im(m3_im));

  spt_cmul_conj #(.W(W), .N_TERMS(1), .P_W(P1_W)) u_m4 (
    .x_re(d_re), .x_im(d_im), .c_re(wb_re), .c_im(wb_im),
    .p_re(m4_re), .p_im(m4_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_re_out <= '0;
      y_im_out <= '0;
    end else begin
      y_re_out <= y_re_in + Y_W'(m3_re) + Y_W'(m4_re);
      y_im_out <= y_im_in + Y_W'(m3_im) + Y_W'(m4_im);
    end
  end

  // ---- weight updates: M1, M2, A1 (feedforward) and M6, M5, A3 (feedback) ----
  logic signed [P2_W:0] m1_re, m1_im;
  logic signed [P1_W:0] m6_re, m6_im;

  spt_cmul_conj #(.W(W), .N_TERMS(SPT_N), .P_W(P2_W)) u_m1 (
    .x_re(xu_in.re), .x_im(xu_in.im), .c_re(e_re_in), .c_im(e_im_in),
    .p_re(m1_re), .p_im(m1_im));

  spt_cmul_conj #(.W(W), .N_TERMS(1), .P_W(P1_W)) u_m6 (
    .x_re(db_re), .x_im(db_im), .c_re(e_re_in), .c_im(e_im_in),
    .p_re(m6_re), .p_im(m6_im));

  // Saturating accumulate of a weight and its (already shifted) update.
  function automatic logic signed [W-1:0] acc_sat(input logic signed [W-1:0] w,
                                                  input logic signed [P2_W:0] dw);
    logic signed [P2_W+1:0] s;
    s = (P2_W+2)'(w) + (P2_W+2)'(dw);
    if (s > (P2_W+2)'(2 ** (W - 1) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (s < -(P2_W+2)'(2 ** (W - 1)))    return {1'b1, {(W-1){1'b0}}};
    return s[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wf_re <= '0;
      wf_im <= '0;
      wb_re <= '0;
      wb_im <= '0;
    end else if (e_upd_in) begin
      wf_re <= acc_sat(wf_re, m1_re >>> SH);
      wf_im <= acc_sat(wf_im, m1_im >>> SH);
      wb_re <= acc_sat(wb_re, (P2_W+1)'(m6_re >>> SH));
      wb_im <= acc_sat(wb_im, (P2_W+1)'(m6_im >>> SH));
    end
  end

endmodule
