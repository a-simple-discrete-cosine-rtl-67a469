// mdft_array: linear systolic array of N complex PEs computing the MDFT.
//
// PE k holds the static twiddle U^-k. Samples enter PE 0 and move one PE to
// the right per clock, so PE k works on sample n at clock n+k (skewed by one
// clock per PE). Each PE accumulates y(n,k) = U^-k (x(n) + y(n-1,k)); after
// the N-th sample it holds (-1)^k Z(k) and copies it into its Latch#3 while
// it starts on the next sequence.
//
// Pump (RPX): one clock after the last sample of a sequence has left PE N-1
// (all N results are then in their Latch#3) every pump stage loads its
// PE's result in parallel; on the following clocks the chain shifts left,
// so (-1)^k Z(k) appears at the left end for k = 0, 1, ..., N-1 on
// consecutive clocks. With a continuous input, the first result appears
// 2N-1 clocks after x(0) was taken in and a new set of N results follows
// every N clocks.
//
// Interface: x/tok from the framing control; z_valid, z_index (k), z_re,
// z_im toward the multiplier. Deriving the pump and the output index from
// the last token is this design's choice. An assertion checks that pumps
// never overlap a result stream still leaving the chain.
module mdft_array
  import dct_pkg::*;
#(
  parameter int N = 4,
  parameter int W = 12,
  localparam int KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  x,
  input  tok_t                 tok,
  output logic                 z_valid,
  output logic [KW-1:0]        z_index,
  output logic signed [W-1:0]  z_re,
  output logic signed [W-1:0]  z_im
);

  // x_c[k] / tok_c[k]: sample entering PE k; index N is the array's right end
  logic signed [W-1:0] x_c   [N+1];
  tok_t                tok_c [N+1];
  // zr_c[k] / zi_c[k]: pump chain output of PE k; index N is the zero fill
  logic signed [W-1:0] zr_c  [N+1];
  logic signed [W-1:0] zi_c  [N+1];
  logic                pump;

  assign x_c[0]   = x;
  assign tok_c[0] = tok;
  assign zr_c[N]  = '0;
  assign zi_c[N]  = '0;

  for (genvar k = 0; k < N; k++) begin : g_pe
    mdft_pe #(.N(N), .W(W), .K(k)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .x_in    (x_c[k]),
      .tok_in  (tok_c[k]),
      .x_out   (x_c[k+1]),
      .tok_out (tok_c[k+1]),
      .pump    (pump),
      .z_adj_re(zr_c[k+1]),
      .z_adj_im(zi_c[k+1]),
      .z_out_re(zr_c[k]),
      .z_out_im(zi_c[k])
    );
  end

  // The last sample of a sequence has just been taken by PE N-1.
  assign pump = tok_c[N].valid && tok_c[N].last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z_valid <= 1'b0;
      z_index <= '0;
    end else if (pump) begin
      z_valid <= 1'b1;
      z_index <= '0;
    end else if (z_valid) begin
      if (int'(z_index) == N - 1) z_valid <= 1'b0;
      else                        z_index <= z_index + 1'b1;
    end
  end

  assign z_re = zr_c[0];
  assign z_im = zi_c[0];

  // Pump-chain rule: a new pump may only come once the previous N results
  // have left (at most on the clock that shows the last of them); otherwise
  // results still in the chain would be overwritten. The token timing
  // guarantees it, since PE N-1 sees at most one last sample per N clocks.
  a_pump_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    pump |-> (!z_valid || int'(z_index) == N - 1))
    else $error("pump while results %0d..%0d are still in the chain", z_index, N - 1);

  // The sample after PE N-1 is not used further.
  logic unused_x;
  assign unused_x = ^x_c[N];

endmodule
