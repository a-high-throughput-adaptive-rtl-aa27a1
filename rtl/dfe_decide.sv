// dfe_decide: decision device and error summer of the equaliser
// (combinational). It reads the equaliser output y and gives the reference
// symbol d and the error e = d - y.
//
// The QPSK decision is the sign of each component of y. A component that is
// exactly zero is decided +1. The mode of the symbol picks the reference:
//   SYM_TRAIN  d = training symbol; the error may update the weights
//   SYM_DATA   d = decision; weights held
//   SYM_IDLE   no symbol; d is marked invalid and counts as zero
// y has W_FRAC+FRAC_X fraction bits and d is +-1+-j at that scale. The
// difference is shifted right by FRAC_X (arithmetic, so it truncates) and
// saturated to W bits. So e has W_FRAC fraction bits, like the tap weights.
// sat flags a clipped component, and e_upd marks an error that may update
// the weights.
//
// The decision device, the summer and the QPSK alphabet follow the document,
// as does training on a known header and then holding the weights. The word
// length, truncation and saturation of the error, the zero tie rule and the
// modes are this design's own.
//
// Interface: y_re/y_im, mode, train_sym in; d, e_re/e_im, e_upd, sat out.
module dfe_decide
  import dfe_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter int unsigned W_FRAC = 13,
  parameter int unsigned FRAC_X = 5,
  parameter int unsigned Y_W    = 30
) (
  input  logic signed [Y_W-1:0] y_re,
  input  logic signed [Y_W-1:0] y_im,
  input  sym_mode_e             mode,
  input  qpsk_t                 train_sym,
  output dec_t                  d,
  output logic signed [W-1:0]   e_re,
  output logic signed [W-1:0]   e_im,
  output logic                  e_upd,
  output logic                  sat
);

  localparam int unsigned E_W = Y_W + 1;
  localparam logic signed [E_W-1:0] ONE  = E_W'(1) <<< (W_FRAC + FRAC_X);
  localparam logic signed [E_W-1:0] EMAX = E_W'(2 ** (W - 1) - 1);
  localparam logic signed [E_W-1:0] EMIN = -E_W'(2 ** (W - 1));

  logic sat_re, sat_im;

  function automatic logic signed [E_W-1:0] ref_val(input logic valid, input logic neg);
    if (!valid) return '0;
    return neg ? -ONE : ONE;
  endfunction

  function automatic logic signed [W:0] scale_sat(input logic signed [E_W-1:0] v);
    logic signed [E_W-1:0] s;
    s = v >>> FRAC_X;
    if (s > EMAX) return {1'b1, EMAX[W-1:0]};
    if (s < EMIN) return {1'b1, EMIN[W-1:0]};
    return {1'b0, s[W-1:0]};
  endfunction

  always_comb begin
    // decision device, then reference selection
    d.valid      = (mode != SYM_IDLE);
    d.sym.re_neg = y_re[Y_W-1];
    d.sym.im_neg = y_im[Y_W-1];
    if (mode == SYM_TRAIN) d.sym = train_sym;
    e_upd = (mode == SYM_TRAIN);
    // summer
    {sat_re, e_re} = scale_sat(ref_val(d.valid, d.sym.re_neg) - E_W'(y_re));
    {sat_im, e_im} = scale_sat(ref_val(d.valid, d.sym.im_neg) - E_W'(y_im));
    sat = sat_re | sat_im;
  end

endmodule
