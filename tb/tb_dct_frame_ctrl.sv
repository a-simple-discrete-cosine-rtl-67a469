// tb_dct_frame_ctrl: random valid pattern; the tokens must mark every N-th
// valid sample as first (starting with the first after reset) and the one
// before it as last, and idle cycles must carry no token.
module tb_dct_frame_ctrl;
  import dct_pkg::*;
  localparam int N = 4, W = 12;
  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [W-1:0] x = '0, x_o;
  tok_t tok;
  int checks = 0, failures = 0, n_seen = 0;

  dct_frame_ctrl #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (n_seen=%0d)", msg, n_seen);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (400) begin
      @(negedge clk);
      x_valid = ($urandom_range(0, 3) != 0);
      x       = W'($urandom);
      #1;
      chk(tok.valid == x_valid, "valid");
      chk(tok.first == (x_valid && (n_seen % N == 0)), "first");
      chk(tok.last  == (x_valid && (n_seen % N == N - 1)), "last");
      chk(x_o == (x_valid ? x : '0), "data");
      if (x_valid) n_seen++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
