// reso_ctrl: sequencer of the fault-tolerant adder.
//
// A narrow addition (the datapath reports `dual`) is computed twice in one
// cycle, so it takes one adder cycle. A wide addition cannot be doubled up; it
// is computed once, its operands are kept, and it is computed again in the
// next cycle with the two operands swapped between the adder inputs. The
// sequencer stays in ST_ISSUE while narrow additions arrive and spends one
// ST_REPEAT cycle after each wide one, during which it takes no new request.
//
// Interface and timing (all relative to the rising clock edge):
//   * `in_ready` is high in ST_ISSUE; a request is accepted when `in_valid`
//     and `in_ready` are both high.
//   * `ld_dual` (narrow) or `ld_first` (wide) pulses in the accept cycle,
//     `ld_second` in the repeat cycle; `sel_held` is high in the repeat cycle
//     and selects the kept, swapped operands.
//   * `out_valid` rises the cycle after `ld_dual` or `ld_second`, so a narrow
//     result appears 1 cycle and a wide one 2 cycles after acceptance.
// The one-cycle/two-cycle split follows the design; the ready/valid handshake
// and the active-low synchronous reset are this implementation's choices.
module reso_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic dual,
  output logic in_ready,
  output logic sel_held,
  output logic ld_dual,
  output logic ld_first,
  output logic ld_second,
  output logic out_valid
);

  ft_add_pkg::ctrl_state_e state_q, state_d;
  logic        accept;

  always_comb begin
    in_ready  = (state_q == ft_add_pkg::ST_ISSUE);
    sel_held  = (state_q == ft_add_pkg::ST_REPEAT);
    accept    = in_valid && in_ready;
    ld_dual   = accept && dual;
    ld_first  = accept && !dual;
    ld_second = (state_q == ft_add_pkg::ST_REPEAT);
    state_d   = ld_first ? ft_add_pkg::ST_REPEAT : ft_add_pkg::ST_ISSUE;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= ft_add_pkg::ST_ISSUE;
      out_valid <= 1'b0;
    end else begin
      state_q   <= state_d;
      out_valid <= ld_dual || ld_second;
    end
  end

  // A wide addition is always followed by exactly one repeat cycle.
  a_repeat_follows_first: assert property (@(posedge clk) disable iff (!rst_n)
    ld_first |=> ld_second && !in_ready);

  // At most one result capture per cycle.
  a_one_capture: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ld_dual, ld_first, ld_second}));

endmodule
