// mdft_pe: complex processing element k of the MDFT systolic array.
//
// Function (per clock): Xout <- Xin;  y <- U^-k * (y + Xin);  Zout <- Zin
// with y cleared at the first sample of every N-sample sequence, so after
// the last sample y = sum_n x(n) U^-(N-n)k = (-1)^k Z(k).
//
// Built from two one-PE chips: the real-part chip receives the real input
// sample, the imaginary-part chip receives zero (the input is real), and the
// two exchange their PROM-sin products every cycle to form the complex
// product. Both chips see the same control token and the same pump. The
// imaginary chip's copy of the sample path is not needed further on and is
// left unconnected.
// The PE function and the pairing of a real-part and an imaginary-part
// circuit follow the original design; clearing y through a token is this
// design's choice.
//
// Interface: x_in/tok_in from the left neighbour (or the input), x_out/
// tok_out to the right neighbour one clock later; z_adj_{re,im} from the
// right neighbour's pump stage, z_out_{re,im} toward the left.
module mdft_pe
  import dct_pkg::*;
#(
  parameter int N = 4,
  parameter int W = 12,
  parameter int K = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  tok_t                tok_in,
  output logic signed [W-1:0] x_out,
  output tok_t                tok_out,
  input  logic                pump,
  input  logic signed [W-1:0] z_adj_re,
  input  logic signed [W-1:0] z_adj_im,
  output logic signed [W-1:0] z_out_re,
  output logic signed [W-1:0] z_out_im
);

  logic signed [W-1:0] re_to_im, im_to_re;
  logic signed [W-1:0] unused_im_x;
  tok_t                unused_im_tok;

  mdft_pe_chip #(.N(N), .W(W), .K(K), .IS_IM(1'b0)) u_re (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_in     (x_in),
    .tok_in   (tok_in),
    .x_out    (x_out),
    .tok_out  (tok_out),
    .cross_out(re_to_im),
    .cross_in (im_to_re),
    .pump     (pump),
    .z_adj_in (z_adj_re),
    .z_out    (z_out_re)
  );

  mdft_pe_chip #(.N(N), .W(W), .K(K), .IS_IM(1'b1)) u_im (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_in     ('0),
    .tok_in   (tok_in),
    .x_out    (unused_im_x),
    .tok_out  (unused_im_tok),
    .cross_out(im_to_re),
    .cross_in (re_to_im),
    .pump     (pump),
    .z_adj_in (z_adj_im),
    .z_out    (z_out_im)
  );

endmodule
