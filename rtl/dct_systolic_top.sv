// dct_systolic_top: N-point DCT of a continuous stream of real samples.
//
// Data path (left to right): the framing control cuts the input stream into
// N-sample sequences; the MDFT systolic array of N complex PEs accumulates,
// in PE k, the modified DFT sample (-1)^k Z(k) with the static twiddle U^-k
// (U = exp(j pi/N)); the finished results are pumped out of the array one
// per clock; the single multiplier turns each into the DCT sample
//   Y(k) = C(k) sum_n x(n) cos((2n+1) k pi / 2N)
// by weighting with (-1)^k C(k) exp(j k pi/2N) and keeping the real part.
//
// Interface: one sample per clock on x when x_valid is high (gaps are
// allowed); Y(0) ... Y(N-1) of each sequence come out on y on consecutive
// clocks with y_valid high and y_index = k. z_re/z_im show the array output
// (-1)^k Z(k) next to it.
// Timing: with a gap-free input, Y(0) of a sequence appears 2N-1 clocks
// after its x(0) was taken in (x(0) taken at clock edge t, Y(0) valid after
// edge t+2N-1), and a new sequence can start every N clocks, i.e. one
// sample in and one coefficient out per clock.
// Arithmetic: W-bit two's complement throughout. The sums are not scaled,
// so |x| must stay below 2^(W-1)/(N+1) for the results to stay in range.
// The chain MDFT array -> multiplier -> real part, the N-clock sequence
// period and the 2N-1 clock delay follow the original design; the x_valid
// input with pauses, the output index/valid and the input range rule are
// this design's choices.
module dct_systolic_top
  import dct_pkg::*;
#(
  parameter int N  = N_DEFAULT,
  parameter int W  = W_DEFAULT,
  parameter int CW = CW_DEFAULT,
  localparam int KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                x_valid,
  input  logic signed [W-1:0] x,
  output logic                y_valid,
  output logic [KW-1:0]       y_index,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] z_re,
  output logic signed [W-1:0] z_im
);

  logic signed [W-1:0] xa;
  tok_t                tok;
  logic                z_valid;
  logic [KW-1:0]       z_index;

  dct_frame_ctrl #(.N(N), .W(W)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_valid(x_valid),
    .x      (x),
    .x_o    (xa),
    .tok    (tok)
  );

  mdft_array #(.N(N), .W(W)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (xa),
    .tok    (tok),
    .z_valid(z_valid),
    .z_index(z_index),
    .z_re   (z_re),
    .z_im   (z_im)
  );

  dct_post_mult #(.N(N), .W(W), .CW(CW)) u_mult (
    .z_valid(z_valid),
    .z_index(z_index),
    .z_re   (z_re),
    .z_im   (z_im),
    .y_valid(y_valid),
    .y_index(y_index),
    .y      (y)
  );

endmodule
