// result_compare: compares the two results of a redundant addition.
//
// `mismatch` is high when the two W-bit values differ in any bit. It is an
// XOR per bit followed by an OR reduction. In the adder it sits after the
// result registers, so the comparison happens in the cycle after the
// addition and stays off the adder's critical path.
//
// Interface: `x`, `y` in, `mismatch` out. Combinational.
module result_compare
  import ft_add_pkg::*;
#(
  parameter int unsigned W = ADD_WIDTH + 1
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         mismatch
);

  logic [W-1:0] diff;

  always_comb begin
    diff     = x ^ y;
    mismatch = |diff;
  end

endmodule
