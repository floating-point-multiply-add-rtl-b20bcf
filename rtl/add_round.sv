// Combined mantissa addition and rounding.
//
// Inputs are the aligned integer parts from the alignment shifter (for a
// subtraction the unshifted one arrives inverted) and the shifted operand's
// R, G and S bits.  Instead of adding and then incrementing, three sums of
// the integer parts are formed at once: A+B and A+B+1 by a dual-result adder,
// and A+B+2 by a row of full adders feeding an ordinary adder.  Rounding
// then only selects among them:
//
//  * Which two sums are the unrounded and the rounded candidate depends on
//    the operation.  Addition: A+B and A+B+1.  Subtraction: the inverted
//    operand's fraction bits are all ones and the two's-complement +1 enters
//    at the bottom, so a carry always reaches the integer part; a result
//    >= 0 is A+B+1 (rounded A+B+2) with the shifted operand's R,G,S below
//    it.  A negative result is inverted by the output muxes: its magnitude
//    is ~(A+B+1) with fraction ~RGS + 1, and one more unit gives ~(A+B).
//  * A 3-bit leading-zero look at bits 53..51 of the unrounded magnitude
//    tells where the LSB will lie after post-normalization, and so where to
//    add the rounding half: bit 53 -> at bit 0 (L), bit 52 -> at R,
//    bit 51 -> at G, otherwise at S.  (Results that need a left shift of 2 or
//    more are exact, so rounding there at S is harmless.)
//  * The round vector is added to the 4-bit fraction vector; bit 3 of that
//    sum says whether the rounded candidate is taken.
//  * On an exact tie the bit left of the rounding position (L1, L0, R or G)
//    is forced to 0: round to nearest even.
//
// Output `v` is {integer part[53:0], R, G} of the rounded magnitude, ready
// for post-normalization; `neg` says that the result's sign is the opposite
// of the unshifted operand's (a subtraction whose shifted operand was the
// larger one).  pos_max (0 = L, 1 = R, 2 = G, 3 = S) caps the rounding
// position when gradual underflow will limit the normalizing left shift:
// the caller gives min(e_more, 3), so a denormal result is rounded at its
// own LSB.  With fixed_r set (float-to-integer conversion) the rounding
// position is always R.  Combinational (fourth pipeline cycle).
//
// Following the original: the three sums, the selection of two of them by
// inverting muxes, the 3-bit leading-zero rounding position, the 4-bit
// round vector and forcing at L1/L0/R/G.  Own choice: the pos_max cap for
// gradual underflow.
module add_round (
  input  logic [53:0] big,      // unshifted operand, inverted if eff_sub
  input  logic [53:0] shifted,  // shifted operand, bit 53 = 0
  input  logic [2:0]  rgs,      // its R,G,S
  input  logic        eff_sub,
  input  logic        fixed_r,  // round at R regardless of the leading bits
  input  logic [1:0]  pos_max,  // latest allowed rounding position (see above)
  output logic [55:0] v,        // {int[53:0], R, G}
  output logic        neg       // result sign opposite to the unshifted operand's
);
  logic [63:0] a64, b64, s0, s1, s2, fs, fc;
  logic [3:0]  low4, bitvec, rndvec;
  logic [2:0]  lowr;
  logic        tneg;
  logic [54:0] nonrnd, rnd, res;
  logic        tie;
  logic [1:0]  pos;   // 0: L, 1: R, 2: G, 3: S

  assign a64 = {{10{eff_sub}}, big};
  assign b64 = {10'b0, shifted};

  adder_both #(.W(64)) u_ab (.a(a64), .b(b64), .sum0(s0), .sum1(s1),
                             .cout0(), .cout1());
  // A+B+2: full-adder row injecting a 1 at bit 1, then an ordinary adder
  csa32 #(.W(64)) u_p2 (.in0(a64), .in1(b64), .in2(64'd2), .sum(fs), .carry(fc));
  assign s2 = fs + fc;

  always_comb begin
    // a subtraction result is A+B+1 (sign in bit 63)
    tneg = eff_sub & s1[63];
    neg  = eff_sub & ~tneg;
    if (!eff_sub) begin
      nonrnd = s0[54:0];
      rnd    = s1[54:0];
      low4   = {1'b0, rgs};
    end else if (!tneg) begin
      nonrnd = s1[54:0];
      rnd    = s2[54:0];
      low4   = {1'b0, rgs};
    end else begin
      nonrnd = ~s1[54:0];
      rnd    = ~s0[54:0];
      low4   = {1'b0, ~rgs} + 4'd1;   // 1000 when RGS = 000: exact, take ~(A+B)
    end
    lowr = low4[2:0];
    if (fixed_r)           pos = 2'd1;
    else if (nonrnd[53])   pos = 2'd0;
    else if (nonrnd[52])   pos = 2'd1;
    else if (nonrnd[51])   pos = 2'd2;
    else                   pos = 2'd3;
    if (pos > pos_max) pos = pos_max;
    rndvec = 4'b1000 >> pos;
    bitvec = low4 + rndvec;
    unique case (pos)
      2'd0: tie = nonrnd[0] & (low4 == 4'b0000);
      2'd1: tie = (lowr == 3'b100);
      2'd2: tie = (lowr[1:0] == 2'b10);
      default: tie = lowr[0];
    endcase
    res = bitvec[3] ? rnd : nonrnd;
    v   = {res[53:0], bitvec[2], bitvec[1]};
    // bits below the rounding position are dropped
    unique case (pos)
      2'd0: v[2:0] = 3'b000;
      2'd1: v[1:0] = 2'b00;
      2'd2: v[0]   = 1'b0;
      default: ;
    endcase
    if (tie) begin
      unique case (pos)
        2'd0: v[3] = 1'b0;    // L1
        2'd1: v[2] = 1'b0;    // L0
        2'd2: v[1] = 1'b0;    // R
        default: v[0] = 1'b0; // G
      endcase
    end
  end
endmodule
