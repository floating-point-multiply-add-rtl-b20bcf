// Array combination: merges the two multiplication arrays' outputs.
//
// Five vectors -- sum and carry of each array plus the Booth correction
// vector holding the +1 of every inverted partial product -- are reduced to
// one sum/carry pair by three rows of 3-2 adders (5 -> 4 -> 3 -> 2).  The
// array outputs are AW-bit two's-complement vectors: they are sign-extended
// to W bits, and those of the second array are placed OFF bits higher (its
// first partial product is product number 11, weight 2^33).  The result,
// added by a carry-propagate adder, is the full 128-bit product.
// Combinational (start of the second pipeline cycle).
//
// Following the original: the arrays' sign-extended outputs (96 bits there,
// AW = 97 here, see mult_array) combined into two 128-bit vectors together
// with the correction vector, by three rows of 3-2 adders.
module array_combine #(
  parameter int unsigned W   = 128,
  parameter int unsigned AW  = 97,   // width of one array's outputs
  parameter int unsigned OFF = 33    // bit position of the second array
) (
  input  logic [AW-1:0] s0,
  input  logic [AW-1:0] c0,
  input  logic [AW-1:0] s1,
  input  logic [AW-1:0] c1,
  input  logic [W-1:0]  corr,
  output logic [W-1:0]  sum,
  output logic [W-1:0]  carry
);
  logic [W-1:0] x_s0, x_c0, x_s1, x_c1;
  logic [W-1:0] sa, ca, sb, cb;

  assign x_s0 = W'(signed'(s0));
  assign x_c0 = W'(signed'(c0));
  assign x_s1 = W'(signed'(s1)) << OFF;
  assign x_c1 = W'(signed'(c1)) << OFF;

  csa32 #(.W(W)) u_r1 (.in0(x_s0), .in1(x_c0), .in2(x_s1), .sum(sa),  .carry(ca));
  csa32 #(.W(W)) u_r2 (.in0(sa),   .in1(ca),   .in2(x_c1), .sum(sb),  .carry(cb));
  csa32 #(.W(W)) u_r3 (.in0(sb),   .in1(cb),   .in2(corr), .sum(sum), .carry(carry));
endmodule
