// tb_sp_rom: exhaustive check of the stored-product ROM.
//
// Three ROMs with different coefficients (an irrational one, a negative one
// and -1.0, which saturates at the most negative operand) are read at every
// one of the 2^W addresses. The expected word is computed here from the
// real product with an explicit round-half-away-from-zero and saturation.
module tb_sp_rom;
  localparam int  W  = 12;
  localparam real PI = 3.14159265358979323846;
  localparam real C0 = 0.70710678118654752;   // cos(pi/4)
  localparam real C1 = -0.92387953251128674;  // -sin(3 pi/8)
  localparam real C2 = -1.0;

  logic signed [W-1:0] a;
  logic signed [W-1:0] q0, q1, q2;
  int checks = 0, failures = 0;

  sp_rom #(.W(W), .COEF(C0)) u0 (.a(a), .q(q0));
  sp_rom #(.W(W), .COEF(C1)) u1 (.a(a), .q(q1));
  sp_rom #(.W(W), .COEF(C2)) u2 (.a(a), .q(q2));

  function automatic int expect_q(real c, int v);
    real p;
    int  r;
    p = c * real'(v);
    r = (p >= 0.0) ? $rtoi($floor(p + 0.5)) : -$rtoi($floor(-p + 0.5));
    if (r >  2 ** (W - 1) - 1) r = 2 ** (W - 1) - 1;
    if (r < -(2 ** (W - 1)))   r = -(2 ** (W - 1));
    return r;
  endfunction

  task automatic check(string nm, logic signed [W-1:0] got, int exp_v);
    checks++;
    if (int'(got) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d got=%0d exp=%0d", nm, a, got, exp_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(2 ** (W - 1)); v < 2 ** (W - 1); v++) begin
      a = W'(v);
      #1;
      check("c0", q0, expect_q(C0, v));
      check("c1", q1, expect_q(C1, v));
      check("c2", q2, expect_q(C2, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
