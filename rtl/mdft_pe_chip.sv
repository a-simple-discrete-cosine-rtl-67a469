// mdft_pe_chip: one part (real or imaginary) of an MDFT processing element.
//
// A complex PE k computes, for each sample x(n) of a sequence,
//   y <- U^-k * (y + x(n)),     U^-k = c - j s,  c = cos(k pi/N), s = sin(k pi/N)
// (eq. 11), so that after the N samples y = (-1)^k Z(k). The complex product
// is split over two of these chips, one per part, which exchange one
// product each cycle:
//   w   = x + y                    (first adder; y is cleared on the first
//                                   sample of a sequence, the E input)
//   Re: y_re <- c*w_re + s*w_im    cross_out = -s*w_re  (to the Im part)
//   Im: y_im <- c*w_im - s*w_re    cross_out = +s*w_im  (to the Re part)
// i.e. y <- PROM_cos(w) + cross_in  (second adder), where PROM_cos and
// PROM_sin are stored-product ROMs holding c*w and (-/+)s*w.
//
// Registers, as in the one-PE chip:
//   Latch#1  x_out/tok_out <- x_in/tok_in every clock (sample to next cell)
//   Latch#2  y <- second adder output on every valid sample (accumulator)
//   Latch#3  z_hold <- second adder output on the last sample (clk2)
//   zout_stage (multiplexer with storage) loads z_hold on pump (RPX) and
//   otherwise takes the adjacent cell's value.
//
// Timing: one clock per sample; the critical path is one flip-flop, two
// adders and one ROM access. Sums wrap at W bits; the caller keeps inputs
// small enough that the N-sample sums stay in range (see README).
// The split into a real and an imaginary chip with cross-coupled PROM sin
// outputs follows the chip's block diagram; the token bundle that carries E
// and the clk2 strobe with the sample is this design's choice.
module mdft_pe_chip
  import dct_pkg::*;
#(
  parameter int N     = 4,
  parameter int W     = 12,
  parameter int K     = 1,     // PE index: twiddle U^-K
  parameter bit IS_IM = 1'b0   // 0: real-part chip, 1: imaginary-part chip
) (
  input  logic                clk,
  input  logic                rst_n,
  // sample stream (Latch#1)
  input  logic signed [W-1:0] x_in,
  input  tok_t                tok_in,
  output logic signed [W-1:0] x_out,
  output tok_t                tok_out,
  // product exchanged with the other part
  output logic signed [W-1:0] cross_out,
  input  logic signed [W-1:0] cross_in,
  // result pump chain
  input  logic                pump,
  input  logic signed [W-1:0] z_adj_in,
  output logic signed [W-1:0] z_out
);

  localparam real C_COEF = twiddle_cos(K, N);
  localparam real S_COEF = IS_IM ? twiddle_sin(K, N) : -twiddle_sin(K, N);

  logic signed [W-1:0] y;        // Latch#2
  logic signed [W-1:0] z_hold;   // Latch#3
  logic signed [W-1:0] w;        // first adder
  logic signed [W-1:0] prod_cos;
  logic signed [W-1:0] sum;      // second adder

  assign w   = x_in + (tok_in.first ? W'(0) : y);

  sp_rom #(.W(W), .COEF(C_COEF)) u_prom_cos (.a(w), .q(prod_cos));
  sp_rom #(.W(W), .COEF(S_COEF)) u_prom_sin (.a(w), .q(cross_out));

  assign sum = prod_cos + cross_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_out   <= '0;
      tok_out <= TOK_IDLE;
      y       <= '0;
      z_hold  <= '0;
    end else begin
      x_out   <= x_in;
      tok_out <= tok_in;
      if (tok_in.valid)                y      <= sum;
      if (tok_in.valid && tok_in.last) z_hold <= sum;
    end
  end

  zout_stage #(.W(W)) u_zout (
    .clk   (clk),
    .rst_n (rst_n),
    .pump  (pump),
    .own_in(z_hold),
    .adj_in(z_adj_in),
    .z_out (z_out)
  );

endmodule
