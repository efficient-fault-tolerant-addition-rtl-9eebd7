// mux2: W-bit two-to-one multiplexer.
//
// In the redundant adder it appears three times: twice with W = n/2, choosing
// what the upper half-adder adds (the operands' own upper halves, input 0, or
// a copy of their lower halves, input 1), and once with W = 1 on the carry
// into the upper half (the lower half's carry out, input 0, or the carry in,
// input 1). The 0/1 input labels follow the adder's block diagram.
//
// Interface: `sel` chooses `d1` when high and `d0` when low. Combinational.
module mux2
  import ft_add_pkg::*;
#(
  parameter int unsigned W = ADD_WIDTH / 2
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  always_comb begin
    if (sel) y = d1;
    else     y = d0;
  end

endmodule
