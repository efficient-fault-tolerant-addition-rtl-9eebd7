// zero_detect: the ZERO block of the redundant adder.
//
// Reports whether every input bit is zero. The inputs are the upper n/2 bits
// of both operands, so `zero` high means both operands fit in n/2 bits and the
// addition can be done twice side by side in one n-bit adder.
//
// It is built as an explicit tree of OR gates of fan-in FANIN followed by one
// inversion. For W = 32 and FANIN = 4 the tree is 8 + 2 four-input gates and
// one two-input gate: three levels deep, as the design's cost estimate assumes.
// The tree shape follows that estimate; the generic level structure for other
// widths is this implementation's own.
//
// Interface: `bits` (W bits) in, `zero` out. Purely combinational.
module zero_detect
  import ft_add_pkg::*;
#(
  parameter int unsigned W     = ADD_WIDTH,
  parameter int unsigned FANIN = ZERO_FANIN
) (
  input  logic [W-1:0] bits,
  output logic         zero
);

  localparam int unsigned LEVELS = or_tree_levels(W, FANIN);

  if (W < 2 || FANIN < 2) begin : g_bad_param
    $error("zero_detect needs W >= 2 and FANIN >= 2");
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned WI = or_tree_width(W, FANIN, l);
    localparam int unsigned WO = or_tree_width(W, FANIN, l + 1);
    logic [WO-1:0] o;
    for (genvar g = 0; g < WO; g++) begin : g_or
      localparam int unsigned LO  = g * FANIN;
      localparam int unsigned CNT = (WI - LO < FANIN) ? (WI - LO) : FANIN;
      if (l == 0) begin : g_leaf
        assign o[g] = |bits[LO +: CNT];
      end else begin : g_node
        assign o[g] = |g_lvl[l-1].o[LO +: CNT];
      end
    end
  end

  assign zero = ~g_lvl[LEVELS-1].o[0];

endmodule
