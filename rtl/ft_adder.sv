// ft_adder: fault-tolerant n-bit adder that exploits narrow operands.
//
// Every addition is computed twice and the two results are compared, so a
// fault in the adder shows up as a mismatch. How the second computation is
// done depends on the operand widths:
//   * Narrow addition: the upper n/2 bits of both operands are zero. The
//     n-bit adder is split and both halves compute the same addition in the
//     same cycle, the upper half on the operands shifted up by n/2 bits
//     (recomputation with shifted operands). Cost: one adder cycle.
//   * Wide addition: the addition is done at full width, then repeated in the
//     next cycle with the two operands swapped between the adder inputs.
//     Cost: two adder cycles.
// The results go into registers and are compared in the following cycle, so
// the comparator adds nothing to the adder's path.
//
// Interface (clk rising edge, active-low synchronous reset rst_n):
//   request:  in_valid / in_ready handshake with operands `a`, `b` and carry
//             in `cin`; the requester holds them until accepted.
//   result:   `out_valid` pulses for one cycle with `sum`, `cout`, `narrow`
//             (the addition used the one-cycle path) and `error` (the two
//             computations disagreed). There is no back-pressure on results.
// Timing: narrow requests can be accepted every cycle and their result appears
// the cycle after acceptance; a wide request blocks the next cycle (in_ready
// low) and its result appears two cycles after acceptance.
//
// Width n, the split into halves, the zero test, the muxes, one-cycle/two-cycle
// operation, operand swapping on repeat and comparison in the next cycle follow
// the design. Comparing the carry outs too, the handshake, and producing a
// narrow result as the (n/2+1)-bit sum zero-extended to n bits are this
// implementation's own choices.
module ft_adder
  import ft_add_pkg::*;
#(
  parameter int unsigned N = ADD_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         out_valid,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         narrow,
  output logic         error
);

  localparam int unsigned H = N / 2;

  // Operands kept for the repeat cycle of a wide addition.
  logic [N-1:0] a_q, b_q;
  logic         cin_q;

  // Adder inputs: the request, or the kept operands swapped.
  logic [N-1:0] op_a, op_b;
  logic         op_cin;

  logic         sel_held, ld_dual, ld_first, ld_second;
  logic         dual;
  logic [H-1:0] s_lo, s_hi;
  logic         c_lo, c_hi;

  // First and second computation of the current addition, as {carry, sum}.
  logic [N:0]   res_q, chk_q;
  logic         narrow_q;
  logic         mismatch;

  mux2 #(.W(N)) u_swap_a (
    .sel (sel_held),
    .d0  (a),
    .d1  (b_q),
    .y   (op_a)
  );

  mux2 #(.W(N)) u_swap_b (
    .sel (sel_held),
    .d0  (b),
    .d1  (a_q),
    .y   (op_b)
  );

  mux2 #(.W(1)) u_hold_cin (
    .sel (sel_held),
    .d0  (cin),
    .d1  (cin_q),
    .y   (op_cin)
  );

  reso_datapath #(.N(N)) u_dp (
    .a    (op_a),
    .b    (op_b),
    .cin  (op_cin),
    .dual (dual),
    .s_lo (s_lo),
    .c_lo (c_lo),
    .s_hi (s_hi),
    .c_hi (c_hi)
  );

  reso_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .dual      (dual),
    .in_ready  (in_ready),
    .sel_held  (sel_held),
    .ld_dual   (ld_dual),
    .ld_first  (ld_first),
    .ld_second (ld_second),
    .out_valid (out_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q      <= '0;
      b_q      <= '0;
      cin_q    <= 1'b0;
      res_q    <= '0;
      chk_q    <= '0;
      narrow_q <= 1'b0;
    end else begin
      if (ld_first) begin
        a_q   <= a;
        b_q   <= b;
        cin_q <= cin;
      end
      if (ld_dual) begin
        // Lower half is the result, upper half the shifted copy.
        res_q    <= (N+1)'({c_lo, s_lo});
        chk_q    <= (N+1)'({c_hi, s_hi});
        narrow_q <= 1'b1;
      end
      if (ld_first) begin
        res_q    <= {c_hi, s_hi, s_lo};
        narrow_q <= 1'b0;
      end
      if (ld_second) begin
        chk_q <= {c_hi, s_hi, s_lo};
      end
    end
  end

  result_compare #(.W(N+1)) u_cmp (
    .x        (res_q),
    .y        (chk_q),
    .mismatch (mismatch)
  );

  assign sum    = res_q[N-1:0];
  assign cout   = res_q[N];
  assign narrow = narrow_q;
  assign error  = out_valid && mismatch;

  // Requester rule: a pending request stays valid and unchanged until taken.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(a) && $stable(b) && $stable(cin));

endmodule
