// Dual-result adder: computes a+b and a+b+1 at once.
//
// Built like a carry-select adder with two global carry chains.  The operand
// is cut into groups of G bits; every group forms its local sum for carry-in
// 0 and for carry-in 1 plus its generate/propagate signals.  Two global
// chains then find each group's carry-in, one for an overall carry-in of 0
// and one for 1, and each result picks its groups' local sums.  This costs
// far less than two full adders.  Carry-outs of both results are given.
// Combinational.
//
// The original describes this adder as its ordinary 64-bit adder with a
// second global carry chain; the 8-bit carry-select local groups are this
// design's choice of local chain.
module adder_both #(
  parameter int unsigned W = 64,
  parameter int unsigned G = 8     // bits per local chain; must divide W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum0,    // a + b
  output logic [W-1:0] sum1,    // a + b + 1
  output logic         cout0,
  output logic         cout1
);
  localparam int unsigned NG = W / G;

  logic [G:0] loc0 [NG];   // local sum with carry-in 0, MSB = group carry-out
  logic [G:0] loc1 [NG];   // local sum with carry-in 1
  logic [NG:0] gc0, gc1;   // global carries into each group

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      loc0[g] = {1'b0, a[g*G +: G]} + {1'b0, b[g*G +: G]};
      loc1[g] = {1'b0, a[g*G +: G]} + {1'b0, b[g*G +: G]} + (G+1)'(1);
    end
  end

  // global carry chains: group generate = loc0 carry-out,
  // group generate-or-propagate = loc1 carry-out
  assign gc0[0] = 1'b0;
  assign gc1[0] = 1'b1;
  for (genvar g = 0; g < NG; g++) begin : g_glob
    assign gc0[g+1] = loc0[g][G] | (loc1[g][G] & gc0[g]);
    assign gc1[g+1] = loc0[g][G] | (loc1[g][G] & gc1[g]);
  end

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      sum0[g*G +: G] = gc0[g] ? loc1[g][G-1:0] : loc0[g][G-1:0];
      sum1[g*G +: G] = gc1[g] ? loc1[g][G-1:0] : loc0[g][G-1:0];
    end
    cout0 = gc0[NG];
    cout1 = gc1[NG];
  end
endmodule
