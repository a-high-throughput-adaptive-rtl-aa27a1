// spt_cmul_conj: complex product p = x * conj(c) of an SPT-coded complex
// datum x and a complex two's complement word c (combinational).
//
//   p_re = x_re*c_re + x_im*c_im
//   p_im = x_im*c_re - x_re*c_im
//
// It is built from four barrel shifter multipliers (spt_shift_mul) and two
// adders. The same form is used for the filter products, x * conj(w), and
// for the weight update products, x * conj(e). The document gives the
// conjugates in its LMS equations. How the complex multiply is split into real
// parts is this design's own.
//
// Interface: x_re/x_im (N_TERMS SPT terms each), c_re/c_im (W bits),
// p_re/p_im (exact, P_W+1 bits). No clock.
module spt_cmul_conj
  import dfe_pkg::*;
#(
  parameter int unsigned W       = 16,
  parameter int unsigned N_TERMS = SPT_N,
  parameter int unsigned P_W     = W + EXP_MAX + $clog2(N_TERMS) + 1
) (
  input  pot_t [N_TERMS-1:0]     x_re,
  input  pot_t [N_TERMS-1:0]     x_im,
  input  logic signed [W-1:0]    c_re,
  input  logic signed [W-1:0]    c_im,
  output logic signed [P_W:0]    p_re,
  output logic signed [P_W:0]    p_im
);

  logic signed [P_W-1:0] rr, ii, ir, ri;

  spt_shift_mul #(.W(W), .N_TERMS(N_TERMS), .P_W(P_W)) u_rr (.x(x_re), .c(c_re), .p(rr));
  spt_shift_mul #(.W(W), .N_TERMS(N_TERMS), .P_W(P_W)) u_ii (.x(x_im), .c(c_im), .p(ii));
  spt_shift_mul #(.W(W), .N_TERMS(N_TERMS), .P_W(P_W)) u_ir (.x(x_im), .c(c_re), .p(ir));
  spt_shift_mul #(.W(W), .N_TERMS(N_TERMS), .P_W(P_W)) u_ri (.x(x_re), .c(c_im), .p(ri));

  assign p_re = (P_W+1)'(rr) + (P_W+1)'(ii);
  assign p_im = (P_W+1)'(ir) - (P_W+1)'(ri);

endmodule
