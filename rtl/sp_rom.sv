// sp_rom: stored-product ROM, used in place of a constant multiplier.
//
// Because every coefficient of the array is static, the product of that
// coefficient with any W-bit two's-complement operand can be stored ahead of
// time: the operand is the address and the word read is
//   q = round(COEF * a)   (rounded to nearest, ties away from zero,
//                          saturated to the W-bit range).
// The products are computed from the exact (real) coefficient, so the only
// error is the single rounding of the product; the coefficient itself is
// never quantised.
//
// Interface: a (W-bit signed operand) in, q (W-bit signed product) out.
// Timing: asynchronous read, purely combinational; the access time sits in
// the PE's single-cycle path together with two adders and a flip-flop.
// The table has 2^W words (4096 of 12 bits at the default size).
// Replacing the constant multipliers by stored-product ROMs follows the
// original design; the full-operand addressing and the rounding and
// saturation rules are this implementation's choices.
module sp_rom #(
  parameter int  W    = 12,
  parameter real COEF = 1.0
) (
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] q
);

  localparam int DEPTH = 2 ** W;
  localparam int QMAX  = 2 ** (W - 1) - 1;
  localparam int QMIN  = -(2 ** (W - 1));

  function automatic logic signed [W-1:0] product(int addr);
    int s;   // operand as a signed value
    int p;
    s = (addr >= DEPTH / 2) ? addr - DEPTH : addr;
    p = int'(COEF * real'(s));   // real-to-int conversion rounds to nearest
    if (p > QMAX) p = QMAX;
    if (p < QMIN) p = QMIN;
    return W'(p);
  endfunction

  logic signed [W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = product(i);
  end

  assign q = rom[$unsigned(a)];

endmodule
