// dct_snr_run: measures the fixed-point signal-to-noise ratio of the MDFT
// array inside dct_systolic_top at transform size N.
//
// Random sequences, uniform over the allowed input range
// |x| <= 2^(W-1)/(N+1), are streamed in back to back. For every result
// leaving the array, (-1)^k Z(k) is compared with its exact value; the SNR
// is the ratio of the output signal power to the power of the error (real
// and imaginary parts together), as in SNR = sigma_y^2 / sigma_f^2. The
// run reports it next to the analytical value 2^(2B+1)/(N+1)^2, with B the
// number of fraction bits (W-1) when the numbers are read as fractions.
// Each result must also lie within N+1 LSB of the exact value per part.
module dct_snr_run #(
  parameter int N    = 4,
  parameter int NSEQ = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output real  snr_db,
  output real  pred_db
);
  localparam int  W  = 12;
  localparam int  KW = (N > 1) ? $clog2(N) : 1;
  localparam real PI = 3.14159265358979323846;
  localparam int  XMAX = (2 ** (W - 1)) / (N + 1);

  logic rst_n = 1'b0, x_valid = 1'b0;
  logic signed [W-1:0] x = '0;
  logic y_valid;
  logic [KW-1:0] y_index;
  logic signed [W-1:0] y, z_re, z_im;

  dct_systolic_top #(.N(N)) dut (.*);

  real ref_re [NSEQ][N], ref_im [NSEQ][N];

  initial begin
    done = 1'b0; checks = 0; failures = 0; snr_db = 0.0; pred_db = 0.0;
  end

  // driver
  initial begin
    int xs [N];
    real ang;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSEQ; s++) begin
      for (int n = 0; n < N; n++) xs[n] = $urandom_range(0, 2 * XMAX) - XMAX;
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
        x_valid = 1'b1;
        x = W'(xs[n]);
      end
    end
    @(negedge clk);
    x_valid = 1'b0;
  end

  // monitor
  initial begin
    int s, k;
    real es, ps, e1, e2;
    s = 0; k = 0; es = 0.0; ps = 0.0;
    while (s < NSEQ) begin
      @(negedge clk);
      if (y_valid) begin
        e1 = real'(z_re) - ref_re[s][k];
        e2 = real'(z_im) - ref_im[s][k];
        es += e1 * e1 + e2 * e2;
        ps += ref_re[s][k] * ref_re[s][k] + ref_im[s][k] * ref_im[s][k];
        checks++;
        if (e1 > N + 1 || e1 < -(N + 1) || e2 > N + 1 || e2 < -(N + 1)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d seq %0d k %0d error (%f,%f)", N, s, k, e1, e2);
        end
        if (k == N - 1) begin k = 0; s++; end
        else k++;
      end
    end
    snr_db  = 10.0 * $log10(ps / es);
    pred_db = 10.0 * $log10((2.0 ** (2 * (W - 1) + 1)) / real'((N + 1) * (N + 1)));
    done = 1'b1;
  end
endmodule
