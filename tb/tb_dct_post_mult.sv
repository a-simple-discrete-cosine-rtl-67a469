// tb_dct_post_mult: for every k and random array outputs A(k), the
// multiplier must give round(C(k) Re{exp(jk pi/2N) (-1)^k A(k)}) within one
// LSB (the weights are quantised to CW bits), computed here in real
// arithmetic; valid and index pass through.
module tb_dct_post_mult;
  localparam int N = 4, W = 12, CW = 12, KW = 2;
  localparam real PI = 3.14159265358979323846;
  logic z_valid;
  logic [KW-1:0] z_index;
  logic signed [W-1:0] z_re, z_im;
  logic y_valid;
  logic [KW-1:0] y_index;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  dct_post_mult #(.N(N), .W(W), .CW(CW)) dut (.*);

  function automatic real ref_y(int k, int zr, int zi);
    real ck, ang, sgn, v;
    ck  = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    sgn = (k % 2 == 0) ? 1.0 : -1.0;
    ang = real'(k) * PI / real'(2 * N);
    v = ck * (($cos(ang) * sgn * zr) - ($sin(ang) * sgn * zi));
    if (v >  2047.0) v =  2047.0;
    if (v < -2048.0) v = -2048.0;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, e;
    for (int i = 0; i < 2000; i++) begin
      z_valid = 1'($urandom);
      z_index = KW'(i % N);
      z_re    = W'($urandom);
      z_im    = W'($urandom);
      if (i < 8) begin z_re = W'(2047 - i); z_im = W'(-2048 + i); end
      #1;
      r = ref_y(i % N, int'(z_re), int'(z_im));
      e = real'(y) - r;
      checks++;
      if (e > 1.0 || e < -1.0) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d z=(%0d,%0d) y=%0d ref=%f", i % N, z_re, z_im, y, r);
      end
      checks++;
      if (y_valid != z_valid || y_index != z_index) begin
        failures++;
        $display("FAIL valid/index passthrough");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
