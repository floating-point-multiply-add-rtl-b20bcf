// Post-normalization of the adder result.
//
// The rounded value v = {integer part[53:0], R, G} has weight 2^1 at its top
// bit.  A 64-bit leading-zero detector finds the first 1 and a left shifter
// moves it to the top, shifting in zeros after R and G; the top 53 bits are
// the mantissa and the exponent is e_more + 1 - shift.  A shift of 0 is the
// overflow case (a right shift by one relative to the integer LSB).  For
// gradual underflow the shift is limited so that the exponent never falls
// below 1; the result is then denormal and its exponent field is 0.
//
// In fixed mode (float-to-integer conversion) no leading-zero shift is done:
// the integer part is shifted left by `fix_lsh` instead, for operands of
// magnitude 2^53 and above.  Combinational (fourth pipeline cycle).
//
// Following the original: a 64-bit leading-zero detector and a left
// shifter, limited so that the exponent never goes below the minimum.  Own
// choice: float-to-integer conversion also uses this shifter (fixed mode).
module post_norm
  import mula_pkg::*;
(
  input  logic [55:0]              v,
  input  logic signed [XEXP_W-1:0] e_more,
  input  logic                     fixed_mode,
  input  logic [3:0]               fix_lsh,
  output logic [52:0]              mant,
  output logic signed [XEXP_W-1:0] exp,      // biased; 0 for denormal/zero
  output logic [64:0]              int_out   // fixed mode result magnitude
);
  logic [6:0]  lz;
  logic        zero;
  logic [6:0]  shift;
  logic [55:0] w;

  lzd64 u_lzd (.x({v, 8'b0}), .count(lz), .zero(zero));

  always_comb begin
    shift = lz;
    if (zero) shift = 7'd0;
    if (signed'({6'b0, shift}) > e_more) shift = e_more[6:0];
    w    = v << shift;
    mant = w[55:3];
    exp  = w[55] ? e_more + 13'sd1 - signed'({6'b0, shift}) : '0;
    int_out = {11'b0, v[55:2]} << fix_lsh;
    if (!fixed_mode) int_out = '0;
  end
endmodule
