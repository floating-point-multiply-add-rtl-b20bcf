// Sticky mask generator of the alignment shifter.
//
// Passes exactly the bits of x that a right shift by `shamt` pushes off the
// end (bit j passes when shamt > j) and forces all other bits to 0; a zero
// detector on the output then gives the (inverted) sticky bit.  It is a
// two-dimensional tiling of mask_cell comparators: every column j holds a
// cascade of radix-4 cells, most significant digit first, whose constants are
// the digits of j.  x enters on the x inputs, 0 on the y inputs, and the
// column's final y output is the masked bit.  The shift amount is given as
// one one-hot 4-bit code per radix-4 digit.  Combinational.
//
// Follows the original: a 2-D tiling of radix-4 comparator cells, one column
// per bit with its column number as constant, x fed with the data and y
// with zero.  The number of digit rows (3, for a 6-bit shift) is this
// design's.
module mask_gen #(
  parameter int unsigned W  = 64,
  parameter int unsigned ND = 3     // radix-4 digits of the shift amount
) (
  input  logic [W-1:0]    x,
  input  logic [2*ND-1:0] shamt,
  output logic [W-1:0]    masked
);
  logic [3:0] sel [ND];

  always_comb begin
    for (int d = 0; d < ND; d++) sel[d] = 4'b0001 << shamt[2*d +: 2];
  end

  for (genvar j = 0; j < W; j++) begin : g_col
    logic cx [ND+1];
    logic cy [ND+1];
    assign cx[ND] = x[j];
    assign cy[ND] = 1'b0;
    for (genvar d = ND - 1; d >= 0; d--) begin : g_cell
      mask_cell #(.K((j >> (2*d)) & 3)) u_cell (
        .inx(cx[d+1]), .iny(cy[d+1]), .sel(sel[d]),
        .outx(cx[d]), .outy(cy[d]));
    end
    assign masked[j] = cy[0];
  end
endmodule
