// tb_dct_systolic_top: end-to-end test of the DCT at its default size
// (N = 4, 12-bit). Random sequences, plus an impulse, a constant and a
// full-scale alternating sequence, are streamed in: the first half back to
// back (one sample per clock), the second half with random idle cycles
// between and inside sequences. Each output Y(k) is compared with
//   C(k) sum_n x(n) cos((2n+1) k pi / 2N)
// computed here in real arithmetic (tolerance 2N+2 LSB: N stored-product
// roundings per part plus the quantised output weight). Also checked:
// outputs in order k = 0..N-1 on consecutive clocks, the 2N-1 clock latency
// from x(0) to Y(0) and one sequence per N clocks when the input has no
// gaps. Counted, and required to happen: back-to-back sequences, a pump
// while the previous results are still leaving, idle cycles inside a
// sequence, idle cycles between sequences, outputs with the alternating
// (odd k) sign.
module tb_dct_systolic_top;
  localparam int  N  = 4, W = 12, KW = 2;
  localparam real PI = 3.14159265358979323846;
  localparam int  NSEQ = 400;
  localparam real TOL = real'(2 * N + 2);

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [W-1:0] x = '0;
  logic y_valid;
  logic [KW-1:0] y_index;
  logic signed [W-1:0] y, z_re, z_im;
  int checks = 0, failures = 0, cyc = 0;
  real max_err = 0.0;

  dct_systolic_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  real ref_y [NSEQ][N];
  int  t_first [NSEQ];
  bit  gapfree [NSEQ];
  int  n_backtoback = 0, n_gap_inside = 0, n_gap_between = 0, n_odd_sign = 0;
  int  n_pump_overlap = 0, n_throughput = 0;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    int xs [N];
    real ck;
    bit idle_before;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle_before = 1'b1;
    for (int s = 0; s < NSEQ; s++) begin
      gapfree[s] = 1'b1;
      for (int n = 0; n < N; n++) begin
        case (s)
          0:       xs[n] = (n == 0) ? 400 : 0;          // impulse
          1:       xs[n] = 408;                         // constant
          2:       xs[n] = (n % 2 == 0) ? 408 : -408;   // alternating
          default: xs[n] = $urandom_range(0, 816) - 408;
        endcase
      end
      for (int k = 0; k < N; k++) begin
        ck = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        ref_y[s][k] = 0.0;
        for (int n = 0; n < N; n++)
          ref_y[s][k] += ck * real'(xs[n]) * $cos(real'((2 * n + 1) * k) * PI / real'(2 * N));
      end
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        if (s >= NSEQ / 2) begin
          while ($urandom_range(0, 2) == 0) begin
            if (n > 0) begin gapfree[s] = 1'b0; n_gap_inside++; end
            else n_gap_between++;
            x_valid = 1'b0; x = W'($urandom);
            idle_before = 1'b1;
            @(negedge clk);
          end
        end
        if (n == 0 && !idle_before) n_backtoback++;
        idle_before = 1'b0;
        x_valid = 1'b1;
        x = W'(xs[n]);
        if (n == 0) t_first[s] = cyc + 1;
      end
    end
    @(negedge clk);
    x_valid = 1'b0;
  end

  // monitor
  initial begin
    int s, k_exp, last_y0;
    real e;
    s = 0; k_exp = 0; last_y0 = -1;
    while (s < NSEQ) begin
      @(negedge clk);
      if (y_valid) begin
        chk(int'(y_index) == k_exp, $sformatf("index %0d exp %0d", y_index, k_exp));
        if (k_exp == 0) begin
          if (gapfree[s]) begin
            chk(cyc - t_first[s] == 2 * N - 1,
                $sformatf("latency %0d exp %0d", cyc - t_first[s], 2 * N - 1));
            if (s > 0 && gapfree[s - 1] && t_first[s] - t_first[s - 1] == N) begin
              chk(cyc - last_y0 == N, "one sequence per N clocks");
              n_throughput++;
            end
          end
          // previous sequence's last result left in the clock just before
          if (s > 0 && cyc - last_y0 == N) n_pump_overlap++;
          last_y0 = cyc;
        end
        e = real'(y) - ref_y[s][k_exp];
        if (e < 0.0) e = -e;
        if (e > max_err) max_err = e;
        chk(e <= TOL, $sformatf("seq %0d Y(%0d) = %0d, expected %f", s, k_exp, y, ref_y[s][k_exp]));
        if (k_exp % 2 == 1 && y != 0) n_odd_sign++;
        if (k_exp == N - 1) begin k_exp = 0; s++; end
        else k_exp++;
      end else begin
        chk(k_exp == 0, "results of a sequence must leave on consecutive clocks");
      end
    end
    $display("max |Y error| = %f LSB", max_err);
    $display("back-to-back sequences      : %0d", n_backtoback);
    $display("pump right after last result: %0d", n_pump_overlap);
    $display("full-rate sequences checked : %0d", n_throughput);
    $display("idle cycles inside sequences: %0d", n_gap_inside);
    $display("idle cycles between seqs    : %0d", n_gap_between);
    $display("odd-k (sign-folded) outputs : %0d", n_odd_sign);
    chk(n_backtoback > 0,   "no back-to-back sequence");
    chk(n_pump_overlap > 0, "no overlapping pump");
    chk(n_throughput > 0,   "no full-rate sequence");
    chk(n_gap_inside > 0,   "no gap inside a sequence");
    chk(n_gap_between > 0,  "no gap between sequences");
    chk(n_odd_sign > 0,     "no odd-k output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
