// tb_mdft_array: the 4-point MDFT array fed a stream of random sequences,
// first back to back (one sample per clock), then with random idle cycles
// between and inside sequences. The test supplies the first/last tokens
// itself. Every result leaving the array must match (-1)^k Z(k) of its
// sequence (real-arithmetic reference, tolerance N+1 LSB), results must
// leave in the order k = 0..N-1 on consecutive clocks, and for gap-free
// sequences Z(0) must appear exactly 2N-1 clocks after x(0) was taken in.
module tb_mdft_array;
  import dct_pkg::*;
  localparam int  N  = 4, W = 12, KW = 2;
  localparam real PI = 3.14159265358979323846;
  localparam int  NSEQ = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] x = '0;
  tok_t tok = TOK_IDLE;
  logic z_valid;
  logic [KW-1:0] z_index;
  logic signed [W-1:0] z_re, z_im;
  int checks = 0, failures = 0, cyc = 0;

  mdft_array #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  real ref_re [NSEQ][N], ref_im [NSEQ][N];
  int  t_first [NSEQ];
  bit  gapfree [NSEQ];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    int xs [N];
    real ang;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSEQ; s++) begin
      gapfree[s] = 1'b1;
      for (int n = 0; n < N; n++) xs[n] = $urandom_range(0, 816) - 408;
      for (int k = 0; k < N; k++) begin
        ref_re[s][k] = 0.0; ref_im[s][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          ang = -PI * real'(k * (N - n)) / real'(N);
          ref_re[s][k] += real'(xs[n]) * $cos(ang);
          ref_im[s][k] += real'(xs[n]) * $sin(ang);
        end
      end
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        if (s >= NSEQ / 2) begin
          while ($urandom_range(0, 2) == 0) begin
            if (n > 0) gapfree[s] = 1'b0;
            tok = TOK_IDLE; x = W'($urandom);
            @(negedge clk);
          end
        end
        x   = W'(xs[n]);
        tok = '{valid: 1'b1, first: (n == 0), last: (n == N - 1)};
        if (n == 0) t_first[s] = cyc + 1;
      end
    end
    @(negedge clk);
    tok = TOK_IDLE;
  end

  // monitor
  initial begin
    int s, k_exp, seen;
    real e1, e2;
    s = 0; k_exp = 0; seen = 0;
    while (s < NSEQ) begin
      @(negedge clk);
      if (z_valid) begin
        chk(int'(z_index) == k_exp, $sformatf("index %0d exp %0d", z_index, k_exp));
        if (k_exp == 0 && gapfree[s])
          chk(cyc - t_first[s] == 2 * N - 1,
              $sformatf("latency %0d exp %0d", cyc - t_first[s], 2 * N - 1));
        e1 = real'(z_re) - ref_re[s][k_exp];
        e2 = real'(z_im) - ref_im[s][k_exp];
        chk(e1 <= N + 1 && e1 >= -(N + 1) && e2 <= N + 1 && e2 >= -(N + 1),
            $sformatf("seq %0d k %0d got (%0d,%0d) exp (%f,%f)", s, k_exp, z_re, z_im,
                      ref_re[s][k_exp], ref_im[s][k_exp]));
        if (k_exp == N - 1) begin k_exp = 0; s++; end
        else k_exp++;
        seen++;
      end else begin
        chk(k_exp == 0, "results of a sequence must leave on consecutive clocks");
      end
    end
    chk(seen == NSEQ * N, "result count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
