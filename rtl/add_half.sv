// add_half: one of the two n/2-bit adders (ADD(n/2)) the n-bit adder is split
// into.
//
// The scheme works with any adder type, so this is written as a plain
// behavioural addition and left to synthesis to map; that choice is this
// implementation's own.
//
// Interface: operands `a`, `b` (W bits) and carry in `cin`; sum `s` and carry
// out `cout`. Combinational.
module add_half
  import ft_add_pkg::*;
#(
  parameter int unsigned W = ADD_WIDTH / 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  always_comb begin
    {cout, s} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
  end

endmodule
