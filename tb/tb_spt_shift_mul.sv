// tb_spt_shift_mul: random test of the barrel shifter multiplier, with 2
// terms and with 1 term. The expected product is the integer product of c and
// the SPT value of x.
module tb_spt_shift_mul;
  import dfe_pkg::*;

  localparam int W = 16;
  localparam int P2 = W + int'(EXP_MAX) + 2;
  localparam int P1 = W + int'(EXP_MAX) + 1;

  pot_t [1:0] x2;
  pot_t [0:0] x1;
  logic signed [W-1:0] c;
  logic signed [P2-1:0] p2;
  logic signed [P1-1:0] p1;
  int checks = 0, failures = 0;

  spt_shift_mul #(.W(W), .N_TERMS(2)) u_dut2 (.x(x2), .c(c), .p(p2));
  spt_shift_mul #(.W(W), .N_TERMS(1)) u_dut1 (.x(x1), .c(c), .p(p1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(pot_t t);
    if (!t.nz) return 0;
    return t.neg ? -(longint'(1) << t.exp) : (longint'(1) << t.exp);
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      x2 = $urandom;
      x1 = $urandom;
      c = $urandom;
      if (i < 4) c = (i[0]) ? 16'sh8000 : 16'sh7fff;  // extremes
      if (i < 4) begin
        x2[0] = '{nz: 1'b1, neg: i[1], exp: 3'd7};
        x2[1] = '{nz: 1'b1, neg: i[1], exp: 3'd6};
      end
      #1;
      checks++;
      if (longint'(p2) != longint'(c) * (val(x2[0]) + val(x2[1]))) begin
        failures++;
        if (failures < 10) $display("FAIL 2-term c=%0d p=%0d", c, p2);
      end
      checks++;
      if (longint'(p1) != longint'(c) * val(x1[0])) begin
        failures++;
        if (failures < 10) $display("FAIL 1-term c=%0d p=%0d", c, p1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
