// One cell of the sticky mask generator: a radix-4 digit comparator stage.
//
// The shift amount's digit arrives one-hot on sel; the cell compares it with
// the fixed constant K of its column.  Equal: inx and iny pass straight
// through.  Digit greater than K: both outputs take inx.  Digit less than K:
// both outputs take iny.  Cascading cells from the most significant digit
// down yields a full greater-than comparison.  Combinational.
//
// Follows the original's cell definition; the one-hot digit width (radix 4)
// is the original's too.
module mask_cell #(
  parameter int unsigned K = 0    // this column's digit, 0..3
) (
  input  logic       inx,
  input  logic       iny,
  input  logic [3:0] sel,         // one-hot shift-amount digit
  output logic       outx,
  output logic       outy
);
  logic gt, eq;

  always_comb begin
    eq = sel[K];
    gt = 1'b0;
    for (int d = K + 1; d < 4; d++) gt |= sel[d];
    if (eq) begin
      outx = inx;
      outy = iny;
    end else if (gt) begin
      outx = inx;
      outy = inx;
    end else begin
      outx = iny;
      outy = iny;
    end
  end
endmodule
