// dct_post_mult: the multiplier at the left end of the array.
//
// The array delivers A(k) = (-1)^k Z(k), one per clock, with its index k.
// The DCT sample follows from eq. (4),
//   Y(k) = C(k) Re{ exp(j k pi / 2N) Z(k) } = a_k Re A(k) - b_k Im A(k),
//   a_k = (-1)^k C(k) cos(k pi / 2N),  b_k = (-1)^k C(k) sin(k pi / 2N),
//   C(0) = 1/sqrt(2), C(k) = 1 otherwise,
// so the alternating output sign is folded into the weights. Only the real
// part of the complex product is formed: two real products and a
// subtraction.
//
// The weights are CW-bit two's complement with CW-2 fraction bits (they lie
// in [-1, 1]); they are computed from N when the design is elaborated. The
// result is rounded to nearest (ties toward +infinity) and saturated to W
// bits.
//
// Interface: z_valid, z_index, z_re, z_im in; y_valid, y_index, y out.
// Timing: combinational, so Y(k) appears in the same cycle as A(k) and the
// whole DCT keeps the array's latency of 2N-1 clocks.
// A single multiplier at the end of the array, weighting by C(k) and
// exp(jk pi/2N) and taking the real part, follows the original design; the
// weight width, the rounding and the combinational timing are this
// design's choices.
module dct_post_mult
  import dct_pkg::*;
#(
  parameter int N  = 4,
  parameter int W  = 12,
  parameter int CW = 12,
  localparam int KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                z_valid,
  input  logic [KW-1:0]       z_index,
  input  logic signed [W-1:0] z_re,
  input  logic signed [W-1:0] z_im,
  output logic                y_valid,
  output logic [KW-1:0]       y_index,
  output logic signed [W-1:0] y
);

  localparam int F  = CW - 2;          // fraction bits of the weights
  localparam int PW = W + CW + 1;      // width of the sum of two products

  typedef logic signed [CW-1:0] coef_t;

  function automatic coef_t quant(real v);
    return CW'(int'(v * real'(2 ** F)));
  endfunction

  function automatic logic [N*CW-1:0] weight_table(bit im);
    logic [N*CW-1:0] t;
    for (int k = 0; k < N; k++) t[k*CW +: CW] = quant(out_weight(k, N, im));
    return t;
  endfunction

  localparam logic [N*CW-1:0] A_TAB = weight_table(1'b0);
  localparam logic [N*CW-1:0] B_TAB = weight_table(1'b1);

  coef_t               a_k, b_k;
  logic signed [PW-1:0] acc, rnd;

  localparam logic signed [PW-1:0] YMAX = PW'(2 ** (W - 1) - 1);
  localparam logic signed [PW-1:0] YMIN = -PW'(2 ** (W - 1));

  always_comb begin
    a_k = A_TAB[z_index*CW +: CW];
    b_k = B_TAB[z_index*CW +: CW];
    acc = PW'(a_k * z_re) - PW'(b_k * z_im);
    rnd = (acc + PW'(2 ** (F - 1))) >>> F;
    if (rnd > YMAX)      y = YMAX[W-1:0];
    else if (rnd < YMIN) y = YMIN[W-1:0];
    else                 y = rnd[W-1:0];
  end

  assign y_valid = z_valid;
  assign y_index = z_index;

endmodule
