// 64-bit leading-zero detector.
//
// Organised like the 64-bit adders: eight local chains each find the first 1
// in their own 8 bits, and a global chain finds the first local chain that
// saw a 1; that chain then supplies the low three bits of the count.
// count = number of zeros above the first 1 (64 when x is all zeros).
// Combinational.
//
// Follows the original's structure: eight local chains and one global
// chain.
module lzd64 (
  input  logic [63:0] x,
  output logic [6:0]  count,
  output logic        zero
);
  logic [2:0] loc [8];   // local counts, chain 7 = bits 63:56
  logic [7:0] hit;

  always_comb begin
    for (int g = 0; g < 8; g++) begin
      hit[g] = |x[g*8 +: 8];
      loc[g] = 3'd0;
      for (int i = 0; i < 8; i++)
        if (x[g*8 + i]) loc[g] = 3'(7 - i);   // last assignment = highest 1
    end
    zero  = ~|hit;
    count = 7'd64;
    for (int g = 0; g < 8; g++)
      if (hit[g]) count = {1'b0, 3'(7 - g), loc[g]};
  end
endmodule
