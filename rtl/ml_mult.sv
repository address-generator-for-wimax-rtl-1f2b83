// ml_mult: the column multiplier (ML) of the address generators, a
// combinational shift-and-add array multiplier.
//
// The generators multiply the (modified) column number by the row count d.
// The block computes p = a * b as the sum of the partial products
// (b[k] ? a << k : 0), one per bit of b, truncated to P_W bits. It has no
// clock and no state. In the generators b is tied to the constant d = 16,
// so synthesis folds the whole array into a 4-bit shift; used alone it is a
// full A_W x B_W multiplier. The multiplier is named in the published
// design, with d drawn as its second input, but its insides are not given:
// the shift-and-add array is this design's choice.
module ml_mult #(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 8,
  parameter int unsigned P_W = A_W + B_W
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [P_W-1:0] p
);

  always_comb begin
    p = '0;
    for (int k = 0; k < B_W; k++) begin
      if (b[k]) p = p + (P_W'(a) << k);
    end
  end

endmodule
