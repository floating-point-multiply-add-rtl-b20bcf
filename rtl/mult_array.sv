// One multiplication array: a linear chain of 3-2 adder rows that sums N
// radix-8 partial products into a redundant sum/carry pair.
//
// Partial product k (PW bits, two's complement) has weight 2^(3k).  The
// first row adds products 0, 1 and 2; every later row adds one more product
// to the running sum and carry, so N products need N-2 rows (11 products ->
// 9 rows).  No row is wider than the bits a product touches: each row works
// in a window that moves up three bit positions per row.  The three lowest
// bits of the running sum and carry can no longer change once a row has
// passed them; they leave the array straight away as the low bits of the
// outputs, and the rest is shifted down three places and sign-extended into
// the next row's window.  Sign extension is exact here: when all three
// inputs of a 3-2 adder row are sign-extended, so are its sum and carry, so
// a window one bit wider than a partial product (PW+1) loses nothing.  The
// first row is six bits wider, since it also holds products 0 and 1 below
// product 2.
//
// Outputs are OW = 3*(N-1) + PW + 1 bits (97 for the defaults) and are to be
// read as two's-complement numbers: sign-extended, sum + carry equals the
// sum of the sign-extended, weighted partial products.  Combinational (first
// pipeline cycle).
//
// Following the original: two 11-product arrays of 3-2 adders, rows that sum
// only the bits touched by the current partial product, sign extension of
// every row's outputs.  Own choice: the window is one bit wider than a
// product, which makes the sign extension provably exact.
module mult_array #(
  parameter int unsigned N  = 11,   // partial products (at least 3)
  parameter int unsigned PW = 66    // partial-product width
) (
  input  logic [PW-1:0]         pp    [N],
  output logic [3*(N-1)+PW:0]   sum,
  output logic [3*(N-1)+PW:0]   carry
);
  localparam int unsigned RW = PW + 1;   // width of rows 2..N-1
  localparam int unsigned FW = RW + 6;   // width of the first row
  localparam int unsigned LW = 3 * (N - 1);

  logic [FW-1:0] f0, f1, f2, fs, fc;
  logic [RW-1:0] s [2:N-1];              // running sum, window of product k
  logic [RW-1:0] c [2:N-1];              // running carry
  logic [LW-1:0] lo_s, lo_c;             // bits that have left the array

  // first row: products 0, 1, 2 at offsets 0, 3, 6
  assign f0 = FW'(signed'(pp[0]));
  assign f1 = FW'(signed'(pp[1])) << 3;
  assign f2 = FW'(signed'(pp[2])) << 6;
  csa32 #(.W(FW)) u_first (.in0(f0), .in1(f1), .in2(f2), .sum(fs), .carry(fc));
  assign s[2]      = fs[FW-1:6];
  assign c[2]      = fc[FW-1:6];
  assign lo_s[5:0] = fs[5:0];
  assign lo_c[5:0] = fc[5:0];

  for (genvar k = 3; k < N; k++) begin : g_row
    logic [RW-1:0] xs, xc, xp;
    assign xs = RW'(signed'(s[k-1][RW-1:3]));
    assign xc = RW'(signed'(c[k-1][RW-1:3]));
    assign xp = RW'(signed'(pp[k]));
    assign lo_s[3*(k-1) +: 3] = s[k-1][2:0];
    assign lo_c[3*(k-1) +: 3] = c[k-1][2:0];
    csa32 #(.W(RW)) u_row (.in0(xs), .in1(xc), .in2(xp), .sum(s[k]), .carry(c[k]));
  end

  assign sum   = {s[N-1], lo_s};
  assign carry = {c[N-1], lo_c};
endmodule
