// spt_shift_mul: barrel shifter multiplier. Multiplies a W-bit two's
// complement word c by an N_TERMS-term signed power-of-two number x
// (combinational).
//
// Each non-zero term shifts c left by its exponent, and the shifted copies are
// added or subtracted. So a 2-term SPT multiplier is two barrel shifters and
// one adder, as the document says. The product is exact: P_W is wide enough
// for the largest term sum (2^EXP_MAX per term) times the largest |c|.
//
// Interface: x (SPT terms), c (multiplicand), p (product). No clock.
module spt_shift_mul
  import dfe_pkg::*;
#(
  parameter int unsigned W       = 16,
  parameter int unsigned N_TERMS = SPT_N,
  parameter int unsigned P_W     = W + EXP_MAX + $clog2(N_TERMS) + 1
) (
  input  pot_t [N_TERMS-1:0]   x,
  input  logic signed [W-1:0]  c,
  output logic signed [P_W-1:0] p
);

  always_comb begin
    logic signed [P_W-1:0] sh;
    p = '0;
    for (int t = 0; t < N_TERMS; t++) begin
      sh = P_W'(c) <<< x[t].exp;
      if (x[t].nz) p = x[t].neg ? p - sh : p + sh;
    end
  end

endmodule
