// ft_add_pkg: constants and types shared by the fault-tolerant adder.
//
// ADD_WIDTH is the full adder width n. The design targets a 32-bit
// microcontroller datapath, so n = 32 and the concurrent (narrow) mode handles
// 16-bit operands. ZERO_FANIN is the fan-in of the OR gates in the zero test;
// 4-input OR gates give the cost-21, depth-3 tree for n = 32.
package ft_add_pkg;

  localparam int unsigned ADD_WIDTH  = 32;
  localparam int unsigned ZERO_FANIN = 4;

  // Sequencer state: ST_ISSUE accepts a new addition, ST_REPEAT is the second
  // (swapped-operand) cycle of a wide addition.
  typedef enum logic {
    ST_ISSUE  = 1'b0,
    ST_REPEAT = 1'b1
  } ctrl_state_e;

  // Number of OR levels needed to reduce `width` bits with `fanin`-input gates.
  function automatic int unsigned or_tree_levels(int unsigned width, int unsigned fanin);
    int unsigned w;
    int unsigned l;
    w = width;
    l = 0;
    while (w > 1) begin
      w = (w + fanin - 1) / fanin;
      l++;
    end
    return l;
  endfunction

  // Number of signals present at level `level` of that tree (level 0 = inputs).
  function automatic int unsigned or_tree_width(int unsigned width, int unsigned fanin,
                                                int unsigned level);
    int unsigned w;
    w = width;
    for (int unsigned i = 0; i < level; i++) w = (w + fanin - 1) / fanin;
    return w;
  endfunction

endpackage
