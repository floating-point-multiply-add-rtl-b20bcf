// Booth encoding stage of the multiplier: radix-8 partial products.
//
// The 64-bit signed multiplicand A and the 66-bit signed multiplier B
// (a floating-point mantissa arrives shifted up by 12 so that its binary
// point lies between bits 64 and 63) give NPP = 22 partial products.  The
// only hard multiple, 3A, is formed here with one carry-propagate adder; 2A
// and 4A are shifts.  Each group of three multiplier bits is encoded by a
// booth_enc8 cell whose selects drive a five-way multiple mux and an optional
// inversion.  Partial product k is delivered as a PW-bit two's-complement
// value of weight 2^(3k); the arrays place it.  Every multiple of a 64-bit
// signed A from -4A to 4A, and its inversion, fits in 66 bits.  Inverted
// (negative) products still lack their +1: those ones are collected in the
// correction vector `corr`, bit 3k set when group k inverts.  The sum of all
// sign-extended pp[k] * 2^(3k) plus corr equals A*B modulo 2^128.
// Combinational (first half-cycle of the pipeline).
//
// Following the original: radix 8, 22 partial products, 3A built by an
// adder in this stage, inversion in place of negation with the +1s left for
// later, 66-bit partial products.  Own choice: the 66-bit signed multiplier
// operand.
module booth_pp_gen #(
  parameter int unsigned NPP = 22,
  parameter int unsigned PW  = 66    // partial-product width
) (
  input  logic [63:0]   a,
  input  logic [65:0]   b,
  output logic [PW-1:0] pp [NPP],
  output logic [127:0]  corr
);
  logic signed [PW-1:0] m1, m2, m3, m4;
  logic [66:0]        b_ext;   // {b, 0}: bit 0 is the b[-1] overlap bit
  logic               inv [NPP];
  logic [4:0]         sel [NPP];

  assign b_ext = {b, 1'b0};

  for (genvar k = 0; k < NPP; k++) begin : g_enc
    logic [3:0] grp;
    if (3*k + 3 <= 66) begin : g_in
      assign grp = b_ext[3*k +: 4];
    end else begin : g_top
      assign grp = {{(3*k + 4 - 67){b_ext[66]}}, b_ext[66:3*k]};
    end
    booth_enc8 u_enc (.bits(grp), .sel_inv(inv[k]), .sel(sel[k]));
  end

  always_comb begin
    m1 = PW'(signed'(a));
    m2 = m1 <<< 1;
    m4 = m1 <<< 2;
    m3 = m1 + m2;               // the 3A adder
    corr = '0;
    for (int k = 0; k < NPP; k++) begin
      logic signed [PW-1:0] m;
      m = '0;
      if (sel[k][1])      m = m1;
      else if (sel[k][2]) m = m2;
      else if (sel[k][3]) m = m3;
      else if (sel[k][4]) m = m4;
      if (inv[k]) m = ~m;
      pp[k] = m;
      corr[3*k] = inv[k];
    end
  end
endmodule
