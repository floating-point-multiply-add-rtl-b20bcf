// Radix-8 Booth encoder cell.
//
// Looks at four bits of the multiplier (bits 3k+2, 3k+1, 3k and the overlap
// bit 3k-1) and chooses which multiple of the multiplicand, from -4A to +4A,
// the partial product of this group adds.  The three low bits are first
// XORed with the top bit (t2, t1, t0); the magnitude is then decoded from
// t2..t0 into one-hot selects for 0, A, 2A, 3A and 4A, and the top bit is
// the invert select.  A negative multiple is formed downstream by inverting
// the positive one; the missing +1 is added in the array combination.
// Combinational; one cell per three multiplier bits.
//
// Following the original: the XOR terms t2/t1/t0, the invert select taken
// from the top bit, and the encoding table.  The select equations are
// derived here from that table.
module booth_enc8 (
  input  logic [3:0] bits,     // {b[3k+2], b[3k+1], b[3k], b[3k-1]}
  output logic       sel_inv,  // invert the selected multiple
  output logic [4:0] sel       // one-hot: sel[m] selects m*A
);
  logic t2, t1, t0;

  always_comb begin
    t2 = bits[3] ^ bits[2];
    t1 = bits[3] ^ bits[1];
    t0 = bits[3] ^ bits[0];
    sel_inv = bits[3];
    sel[4]  =  t2 &  t1 &  t0;
    sel[3]  =  t2 & (t1 ^ t0);
    sel[2]  = (t2 & ~t1 & ~t0) | (~t2 & t1 & t0);
    sel[1]  = ~t2 & (t1 ^ t0);
    sel[0]  = ~t2 & ~t1 & ~t0;
  end
endmodule
