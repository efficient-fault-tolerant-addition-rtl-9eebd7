// reso_datapath: n-bit adder that can compute one narrow addition twice at
// once.
//
// The n-bit adder is split into two n/2-bit adders. A zero test looks at the
// upper n/2 bits of both operands. When they are all zero (`dual` high) the
// addition fits in n/2 bits, so:
//   * two n/2-bit multiplexers feed the upper adder with copies of the lower
//     operand halves instead of the upper halves, and
//   * a 1-bit multiplexer feeds the upper adder's carry input with the carry
//     in instead of the lower adder's carry out.
// Both halves then compute the same addition, the upper one with operands
// shifted up by n/2 bits: recomputation with shifted operands, done in the
// same cycle. When `dual` is low the two halves form an ordinary n-bit adder.
//
// The structure (zero test, two operand muxes, carry mux, two half adders,
// and which mux input is 0 and which is 1) follows the adder's block diagram.
//
// Interface: operands `a`, `b` (N bits) and carry in `cin`. Outputs are the
// raw half results: lower sum `s_lo` / carry `c_lo`, upper sum `s_hi` / carry
// `c_hi`, and `dual`. In wide mode the n-bit sum is {s_hi, s_lo} with carry
// out c_hi; in dual mode {c_lo, s_lo} and {c_hi, s_hi} are the two copies of
// the (n/2+1)-bit result. Combinational.
module reso_datapath
  import ft_add_pkg::*;
#(
  parameter int unsigned N = ADD_WIDTH
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           cin,
  output logic           dual,
  output logic [N/2-1:0] s_lo,
  output logic           c_lo,
  output logic [N/2-1:0] s_hi,
  output logic           c_hi
);

  localparam int unsigned H = N / 2;

  if (N < 4 || N % 2 != 0) begin : g_bad_param
    $error("reso_datapath needs an even N >= 4");
  end

  logic [H-1:0] a_l, a_h, b_l, b_h;
  logic [H-1:0] hi_a, hi_b;
  logic         hi_cin;

  assign a_l = a[H-1:0];
  assign a_h = a[N-1:H];
  assign b_l = b[H-1:0];
  assign b_h = b[N-1:H];

  zero_detect #(.W(N)) u_zero (
    .bits ({a_h, b_h}),
    .zero (dual)
  );

  mux2 #(.W(H)) u_mux_a (
    .sel (dual),
    .d0  (a_h),
    .d1  (a_l),
    .y   (hi_a)
  );

  mux2 #(.W(H)) u_mux_b (
    .sel (dual),
    .d0  (b_h),
    .d1  (b_l),
    .y   (hi_b)
  );

  mux2 #(.W(1)) u_mux_c (
    .sel (dual),
    .d0  (c_lo),
    .d1  (cin),
    .y   (hi_cin)
  );

  add_half #(.W(H)) u_add_lo (
    .a    (a_l),
    .b    (b_l),
    .cin  (cin),
    .s    (s_lo),
    .cout (c_lo)
  );

  add_half #(.W(H)) u_add_hi (
    .a    (hi_a),
    .b    (hi_b),
    .cin  (hi_cin),
    .s    (s_hi),
    .cout (c_hi)
  );

endmodule
