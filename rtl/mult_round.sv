// Multiplier rounding stage: carry-propagate add of the product's sum/carry
// vectors merged with IEEE round-to-nearest-even.
//
// Floating-point operands are placed so that the 106-bit mantissa product has
// its binary point between bits 116 and 115: a 53-bit result then has its
// LSB at bit 64 and its rounding (R) bit at bit 63, or, when the product is
// 2 or more (bit 117 set), its LSB at bit 65 and R bit at bit 64.
//
// The low 64 bits are added by an ordinary adder; its carry-out c64 is the
// pre-rounding bit, which a row of full adders adds into the high 64 bits
// before the dual-result adder (adder_both) forms hi = H and hi+1.  The
// rounding decision then only chooses between these two -- no second,
// sequential increment is needed:
//   product < 2 : round up when R (bit 63) is set;
//   product >= 2: round up when bit 64 is set.
// A zero detector on the low bits gives the sticky bit; on an exact tie the
// LSB is forced to 0 (round to nearest even).  A carry out of rounding
// (1.11..1 -> 10.0) is a further right shift by one.  exp_adj tells the
// exponent logic how far the mantissa was shifted right (0, 1 or 2).
//
// Integer multiplies force the pre-rounding bit to 0 and let c64 choose
// between H and H+1, which yields the plain 128-bit product.
// Combinational (second pipeline cycle).
//
// Following the original: a low 64-bit adder, a zero detector for sticky,
// a full-adder row for the pre-rounding bit, a dual-result high adder,
// selection and LSB forcing, and the integer mode.  Own choice: the
// pre-rounding bit is the low adder's carry-out rather than an OR of the
// two vectors' R bits.
module mult_round (
  input  logic [127:0] sum,
  input  logic [127:0] carry,
  input  logic         is_int,     // integer multiply: no rounding
  output logic [63:0]  prod_lo,    // product bits 63:0
  output logic [63:0]  prod_hi,    // product bits 127:64
  output logic [52:0]  mant,       // rounded 53-bit mantissa (1.52 format)
  output logic [1:0]   exp_adj     // right shifts applied: add to exponent
);
  logic [64:0] lo;
  logic        c64, r_bit, sticky, pre;
  logic [63:0] fs, fc, h0, h1, hu, v;
  logic        ov, inc, tie;
  logic        unused_cout;

  assign lo  = {1'b0, sum[63:0]} + {1'b0, carry[63:0]};
  assign c64 = lo[64];
  assign pre = is_int ? 1'b0 : c64;

  // full-adder row folding the pre-rounding bit into the high half
  csa32 #(.W(64)) u_pre (.in0(sum[127:64]), .in1(carry[127:64]), .in2({63'b0, pre}),
                         .sum(fs), .carry(fc));
  adder_both #(.W(64)) u_hi (.a(fs), .b(fc), .sum0(h0), .sum1(h1),
                             .cout0(unused_cout), .cout1());

  always_comb begin
    prod_lo = lo[63:0];
    prod_hi = (is_int && c64) ? h1 : h0;
    hu      = h0;                         // unrounded high half (fp)
    r_bit   = lo[63];
    sticky  = |lo[62:0];                  // zero detector, inverted
    ov      = hu[53];
    if (ov) begin
      inc = hu[0];
      tie = hu[0] & ~r_bit & ~sticky;
    end else begin
      inc = r_bit;
      tie = r_bit & ~sticky;
    end
    v = inc ? h1 : h0;
    if (tie) begin
      if (ov) v[1] = 1'b0;
      else    v[0] = 1'b0;
    end
    if (v[54]) begin
      mant    = v[54:2];
      exp_adj = 2'd2;
    end else if (v[53]) begin
      mant    = v[53:1];
      exp_adj = 2'd1;
    end else begin
      mant    = v[52:0];
      exp_adj = 2'd0;
    end
  end
endmodule
