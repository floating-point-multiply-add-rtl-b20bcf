// Row of 3-2 adders (full adders) reducing three W-bit vectors to a sum and a
// carry vector.
//
// Each bit position adds its three inputs and produces a sum bit and a carry
// bit; the carry vector is returned already moved up one position, so that
// in0 + in1 + in2 == sum + carry (modulo 2^W).  This is the 3-2 adder cell the
// multiplier arrays, the array combination and the pre-rounding rows are built
// from.  Purely combinational.
//
// The original builds this row from custom differential domino and hybrid
// CVSL full adders; only their logic function is kept here.
module csa32 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;

  always_comb begin
    sum   = in0 ^ in1 ^ in2;
    maj   = (in0 & in1) | (in0 & in2) | (in1 & in2);
    carry = {maj[W-2:0], 1'b0};
  end
endmodule
