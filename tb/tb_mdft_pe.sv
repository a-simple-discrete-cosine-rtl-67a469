// tb_mdft_pe: complex PEs k = 1 and k = 3 of a 4-point array, fed random
// 4-sample sequences back to back. One clock after the last sample of a
// sequence the test pumps the PEs; the pumped value must equal
// (-1)^k Z(k) = sum_n x(n) exp(-j pi k (N-n)/N), computed here in real
// arithmetic, to within the rounding of N stored products per part.
// In the clock after that the pump stage must pass on the adjacent value.
module tb_mdft_pe;
  import dct_pkg::*;
  localparam int  N  = 4, W = 12;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = real'(N + 1);
  localparam int  KS [2] = '{1, 3};

  logic clk = 1'b0, rst_n = 1'b0, pump = 1'b0;
  logic signed [W-1:0] x_in = '0;
  tok_t tok_in = TOK_IDLE;
  logic signed [W-1:0] zadj_re = '0, zadj_im = '0;
  logic signed [W-1:0] x_out [2], z_re [2], z_im [2];
  tok_t tok_out [2];
  int checks = 0, failures = 0;
  real max_err = 0.0;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    mdft_pe #(.N(N), .W(W), .K(KS[i])) u_pe (
      .clk, .rst_n, .x_in, .tok_in, .x_out(x_out[i]), .tok_out(tok_out[i]),
      .pump, .z_adj_re(zadj_re), .z_adj_im(zadj_im),
      .z_out_re(z_re[i]), .z_out_im(z_im[i]));
  end

  always #5 clk = ~clk;

  task automatic chk_close(real got, real exp_v, string msg);
    real e;
    e = got - exp_v;
    if (e < 0.0) e = -e;
    if (e > max_err) max_err = e;
    checks++;
    if (e > TOL) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %f exp %f", msg, got, exp_v);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [N];
    real er [2], ei [2], ang;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 200; s++) begin
      for (int n = 0; n < N; n++) xs[n] = $urandom_range(0, 816) - 408;
      if (s == 0) for (int n = 0; n < N; n++) xs[n] = 408;
      for (int i = 0; i < 2; i++) begin
        er[i] = 0.0; ei[i] = 0.0;
        for (int n = 0; n < N; n++) begin
          ang = -PI * real'(KS[i] * (N - n)) / real'(N);
          er[i] += real'(xs[n]) * $cos(ang);
          ei[i] += real'(xs[n]) * $sin(ang);
        end
      end
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        pump   = (n == 0 && s > 0);   // one clock after the previous last sample
        x_in   = W'(xs[n]);
        tok_in = '{valid: 1'b1, first: (n == 0), last: (n == N - 1)};
        zadj_re = W'($urandom); zadj_im = W'($urandom);
        if (n == 1 && s > 0) begin
          // previous clock was the pump: check the pumped values
          for (int i = 0; i < 2; i++) begin
            chk_close(real'(z_re[i]), pr[i], $sformatf("re k=%0d seq %0d", KS[i], s - 1));
            chk_close(real'(z_im[i]), pi_[i], $sformatf("im k=%0d seq %0d", KS[i], s - 1));
          end
        end
        if (n == 2 && s > 0) begin
          for (int i = 0; i < 2; i++) begin
            checks++;
            if (z_re[i] !== last_adj_re || z_im[i] !== last_adj_im) begin
              failures++;
              $display("FAIL shift k=%0d", KS[i]);
            end
          end
        end
        last_adj_re = zadj_re; last_adj_im = zadj_im;
      end
      for (int i = 0; i < 2; i++) begin pr[i] = er[i]; pi_[i] = ei[i]; end
    end
    $display("max |error| = %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pr [2], pi_ [2];
  logic signed [W-1:0] last_adj_re, last_adj_im;
endmodule
