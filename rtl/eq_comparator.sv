// eq_comparator: the "eq?" block of the recursion architectures.
//
// Compares two W-bit words and raises eq when they are equal. In every
// recursion cell one input is the running successor (counter) value and the
// other the bound argument; eq then ends the recursion and acts as Ready.
// Purely combinational: eq follows the inputs in the same cycle. The
// bit-wise XNOR/AND-tree form is this design's choice; the document only
// names the block.
module eq_comparator #(
  parameter int unsigned W = formal_pkg::DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);
  always_comb eq = &(a ~^ b);
endmodule
