// spt_quantiser: approximates an IN_W-bit two's complement sample by a sum of
// SPT_N signed power-of-two terms (combinational).
//
// Each term is found greedily. Take the magnitude of what is left, find its
// leading one at position p, and round to the nearer of 2^p and 2^(p+1).
// The bit below the leading one decides, so a tie goes to 2^(p+1). The term
// gets the sign of what is left, and is subtracted before the next term is
// found. For 8-bit input and two terms this always reaches the smallest
// possible error of any 2-SPT code. The largest error is 8, at +-88 and
// +-104.
//
// The document quantises the input data, not the coefficients, to 2-SPT. It
// does this once per sample, ahead of the filter. It cites the decomposition
// method without giving it, so this greedy rule is this design's own.
//
// Interface: x is the sample, q the SPT code (q[0] is the larger term).
// No clock and no state.
module spt_quantiser
  import dfe_pkg::*;
(
  input  logic signed [IN_W-1:0] x,
  output spt_t                   q
);

  localparam int unsigned R_W = IN_W + 2;  // residual width, holds +-2^IN_W

  // Nearest power of two to a positive magnitude, ties to the larger one.
  function automatic logic [EXP_W-1:0] nearest_exp(input logic [R_W-1:0] a);
    logic [EXP_W-1:0] p;
    p = '0;
    for (int unsigned b = 0; b < R_W; b++) begin
      if (a[b]) p = EXP_W'(b);
    end
    if (p != 0 && a[p-1] && p != EXP_W'(EXP_MAX)) p = p + 1'b1;
    return p;
  endfunction

  always_comb begin
    logic signed [R_W-1:0] r;
    logic        [R_W-1:0] mag;
    logic signed [R_W-1:0] term;
    r = R_W'(x);
    for (int t = 0; t < SPT_N; t++) begin
      mag       = r[R_W-1] ? R_W'(-r) : R_W'(r);
      q[t].nz   = (r != 0);
      q[t].neg  = r[R_W-1];
      q[t].exp  = (r != 0) ? nearest_exp(mag) : '0;
      term      = R_W'(1) <<< q[t].exp;
      if (q[t].nz) r = q[t].neg ? r + term : r - term;
    end
  end

endmodule
