// tb_dct_snr: output SNR of the MDFT array at N = 4 (the default size) and
// N = 8, 12-bit arithmetic, against the analytical 2^(2B+1)/(N+1)^2.
// The measured value must be within 3 dB of the prediction, and every
// result within N+1 LSB of the exact one.
module tb_dct_snr;
  logic clk = 1'b0;
  logic done4, done8;
  int   c4, f4, c8, f8;
  real  s4, p4, s8, p8;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct_snr_run #(.N(4), .NSEQ(2000)) u_n4 (.clk, .done(done4), .checks(c4), .failures(f4), .snr_db(s4), .pred_db(p4));
  dct_snr_run #(.N(8), .NSEQ(1000)) u_n8 (.clk, .done(done8), .checks(c8), .failures(f8), .snr_db(s8), .pred_db(p8));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done4 && done8);
    checks   = c4 + c8 + 2;
    failures = f4 + f8;
    $display("N=4: SNR %0.2f dB measured, %0.2f dB predicted", s4, p4);
    $display("N=8: SNR %0.2f dB measured, %0.2f dB predicted", s8, p8);
    if (s4 < p4 - 3.0 || s4 > p4 + 3.0) begin failures++; $display("FAIL N=4 SNR"); end
    if (s8 < p8 - 3.0 || s8 > p8 + 3.0) begin failures++; $display("FAIL N=8 SNR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
