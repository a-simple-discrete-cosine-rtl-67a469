// tb_mdft_pe_chip: one real-part chip (PE k = 1 of a 4-point array) and one
// imaginary-part chip (k = 3), driven alone with random samples, tokens,
// cross products, pump and adjacent-cell values. A cycle-level reference
// model (accumulator, result latch, pump stage, sample latch, stored
// products computed here from cos/sin in real arithmetic) predicts every
// output on every clock.
module tb_mdft_pe_chip;
  import dct_pkg::*;
  localparam int  N  = 4, W = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] x_in = '0, cross_in [2], z_adj_in [2];
  tok_t tok_in = TOK_IDLE;
  logic pump = 1'b0;
  logic signed [W-1:0] x_out [2], cross_out [2], z_out [2];
  tok_t tok_out [2];
  int checks = 0, failures = 0;

  mdft_pe_chip #(.N(N), .W(W), .K(1), .IS_IM(1'b0)) u_re (
    .clk, .rst_n, .x_in, .tok_in, .x_out(x_out[0]), .tok_out(tok_out[0]),
    .cross_out(cross_out[0]), .cross_in(cross_in[0]), .pump,
    .z_adj_in(z_adj_in[0]), .z_out(z_out[0]));
  mdft_pe_chip #(.N(N), .W(W), .K(3), .IS_IM(1'b1)) u_im (
    .clk, .rst_n, .x_in, .tok_in, .x_out(x_out[1]), .tok_out(tok_out[1]),
    .cross_out(cross_out[1]), .cross_in(cross_in[1]), .pump,
    .z_adj_in(z_adj_in[1]), .z_out(z_out[1]));

  always #5 clk = ~clk;

  function automatic int rprod(real c, int v);
    real p;
    int r;
    p = c * real'(v);
    r = (p >= 0.0) ? $rtoi($floor(p + 0.5)) : -$rtoi($floor(-p + 0.5));
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  function automatic int wrap(int v);
    return int'(12'(v) ^ 12'h800) - 2048;
  endfunction

  // model state per chip
  int m_y [2], m_hold [2], m_z [2], m_x [2];
  tok_t m_tok [2];
  real cc [2], ss [2];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", msg, $time);
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
    int w, sum, n;
    cc[0] = $cos(PI / 4.0);      ss[0] = -$sin(PI / 4.0);
    cc[1] = $cos(3.0 * PI / 4.0); ss[1] =  $sin(3.0 * PI / 4.0);
    for (int c = 0; c < 2; c++) begin
      m_y[c] = 0; m_hold[c] = 0; m_z[c] = 0; m_x[c] = 0; m_tok[c] = TOK_IDLE;
      cross_in[c] = '0; z_adj_in[c] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    n = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      tok_in.valid = ($urandom_range(0, 4) != 0);
      tok_in.first = tok_in.valid && (n % N == 0);
      tok_in.last  = tok_in.valid && (n % N == N - 1);
      if (tok_in.valid) n++;
      x_in = W'($signed($urandom_range(0, 800)) - 400);
      pump = ($urandom_range(0, 5) == 0);
      for (int c = 0; c < 2; c++) begin
        cross_in[c] = W'($signed($urandom_range(0, 800)) - 400);
        z_adj_in[c] = W'($urandom);
      end
      #1;
      for (int c = 0; c < 2; c++) begin
        w = wrap(int'(x_in) + (tok_in.first ? 0 : m_y[c]));
        chk(int'(cross_out[c]) == rprod(ss[c], w), $sformatf("cross_out chip %0d", c));
        sum = wrap(rprod(cc[c], w) + int'(cross_in[c]));
        // state update at the next edge
        m_z[c] = pump ? m_hold[c] : int'(z_adj_in[c]);
        if (tok_in.valid) m_y[c] = sum;
        if (tok_in.valid && tok_in.last) m_hold[c] = sum;
        m_x[c] = int'(x_in);
        m_tok[c] = tok_in;
      end
      @(posedge clk);
      #1;
      for (int c = 0; c < 2; c++) begin
        chk(int'(z_out[c]) == m_z[c], $sformatf("z_out chip %0d got %0d exp %0d", c, z_out[c], m_z[c]));
        chk(int'(x_out[c]) == m_x[c] && tok_out[c] == m_tok[c], $sformatf("x/tok out chip %0d", c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
