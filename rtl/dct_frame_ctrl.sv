// dct_frame_ctrl: splits the input stream into N-sample sequences.
//
// The array needs to know where each sequence starts and ends: the first
// sample clears a PE's accumulator (the E input of the PE chip) and the last
// one makes the PE capture its finished result (the clk2 strobe of Latch#3).
// This block counts valid input samples modulo N and attaches that token to
// each sample. A sample counts only when x_valid is high, so the input may
// pause between (or inside) sequences.
//
// Interface: x_valid/x in; x_o (same sample) and tok out, combinational in
// the same cycle. The sample counter advances on each clock edge that takes
// a valid sample. Resetting the count starts a new sequence.
// The original design only states that the PE latches are cleared after
// each N-sample sequence; this counter and the token format are this
// design's own.
module dct_frame_ctrl
  import dct_pkg::*;
#(
  parameter int N = 4,
  parameter int W = 12,
  localparam int KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                x_valid,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] x_o,
  output tok_t                tok
);

  logic [KW-1:0] cnt;   // index n of the next sample within its sequence

  always_ff @(posedge clk) begin
    if (!rst_n)                   cnt <= '0;
    else if (x_valid) begin
      if (int'(cnt) == N - 1)     cnt <= '0;
      else                        cnt <= cnt + 1'b1;
    end
  end

  assign x_o       = x_valid ? x : '0;
  assign tok.valid = x_valid;
  assign tok.first = x_valid && (cnt == '0);
  assign tok.last  = x_valid && (int'(cnt) == N - 1);

endmodule
