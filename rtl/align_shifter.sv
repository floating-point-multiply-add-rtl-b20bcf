// Alignment shifter of the adder half of the pipeline.
//
// Compares the exponents of the two adder operands (the rounded product P and
// the addend C), lets a pair of 2-input muxes route the one with the larger
// exponent to the unshifted side and the other to a 64-bit right shifter,
// and shifts it by the exponent difference (clamped to 63, which already
// pushes every mantissa bit into the sticky region).  Operand mantissas are
// 64 bits with the 53 significant bits on top, so after the shift bits 63:11
// are the aligned integer part and bits 10 and 9 the R and G bits.  The S
// (sticky) bit is the OR of everything below G: the bits still in the
// shifter output below bit 9, plus the bits shifted off the end, found by
// the mask generator and a zero detector.  Finally the unshifted operand is
// inverted for an effective subtraction (its fraction bits, all zero, become
// ones, so the missing +1 enters below the shifted operand's S bit and the
// adder adds it at the integer LSB).  The shift also performs gradual underflow: a product whose exponent
// lies below the minimum meets an addend with exponent >= 1 and is shifted
// right into the denormal range here.  On equal exponents C is the
// unshifted operand.  Combinational (third pipeline cycle).
//
// Following the original: swap muxes, a 64-bit right shifter, the mask
// generator for the sticky bit and inversion of the unshifted operand.
// Own choices: shift amounts are clamped to 63, and equal exponents keep C
// unshifted.
module align_shifter
  import mula_pkg::*;
(
  input  xfp_t        p,
  input  xfp_t        c,
  output logic signed [XEXP_W-1:0] e_more,
  output logic        swap,       // 1: P is the shifted operand (C larger)
  output logic        eff_sub,    // operand signs differ
  output logic        sign_more,  // sign of the unshifted operand
  output logic [53:0] big,        // unshifted integer part (bit 53 = 0), then inverted if eff_sub
  output logic [53:0] shifted,    // shifted integer part, bit 53 = 0
  output logic [2:0]  rgs         // R, G, S of the shifted operand
);
  logic signed [XEXP_W-1:0] diff;
  logic [5:0]  sh;
  logic [63:0] less, y, masked;
  logic [63:0] stage [7];
  logic        s_bit;

  mask_gen #(.W(64), .ND(3)) u_mask (.x(less), .shamt(sh), .masked(masked));

  // operand swap and shift amount
  always_comb begin
    swap      = c.exp >= p.exp;
    e_more    = swap ? c.exp : p.exp;
    diff      = swap ? c.exp - p.exp : p.exp - c.exp;
    less      = swap ? p.mant : c.mant;
    sh        = (diff > 13'sd63) ? 6'd63 : diff[5:0];
  end

  always_comb begin
    sign_more = swap ? c.sign : p.sign;
    eff_sub   = p.sign ^ c.sign;
    // logarithmic right shifter
    stage[0] = less;
    for (int i = 0; i < 6; i++)
      stage[i+1] = sh[i] ? (stage[i] >> (1 << i)) : stage[i];
    y = stage[6];
    s_bit = (|y[8:0]) | (|masked);
    big   = {1'b0, (swap ? c.mant[63:11] : p.mant[63:11])};
    shifted = {1'b0, y[63:11]};
    rgs   = {y[10], y[9], s_bit};
    if (eff_sub) big = ~big;
  end
endmodule
