// vedic_merge: the carry-save partial-product merge of the modified Vedic
// multiplier.
//
// An NxN Vedic multiplier (N = 2*H) splits a = {ah, al} and b = {bh, bl}
// into H-bit halves and forms four N-bit partial products
//   q0 = al*bl, q1 = ah*bl, q2 = al*bh, q3 = ah*bh,
// with a*b = q0 + (q1 + q2) << H + q3 << N. This module adds them.
//   * The low H bits of the product are q0[H-1:0]; nothing is added to them.
//   * The next 2H bits come from one N-bit carry-save adder of three
//     operands: q1, q2, and {q3[H-1:0], q0[N-1:H]}, the upper half of q0
//     concatenated under the lower half of q3 (operands of unequal size are
//     concatenated into one word instead of being added separately).
//     The CSA's total t has N+2 bits; t[N-1:0] are product bits 3H-1..H.
//   * The top H bits are q3[N-1:H] plus the two spill bits t[N+1:N], added
//     by a ripple-carry adder of only H bits, half the width of the others.
// Using a CSA in place of two chained ripple adders, and sizing the final
// adder at half width, is the "modified" part of the design; the exact
// arrangement of operands is this design's reading of it. The final adder's
// carry out is always 0, since the product fits in 2N bits; it is left open.
//
// Interface: q0..q3 (2H bits each) in; p (4H bits) out; p[H-1:0] is wired
// straight from q0[H-1:0] on purpose. Parameter H, the
// half-operand width, defaults to 16 as in the 32x32 top. Purely
// combinational.
module vedic_merge #(
  parameter int unsigned H = 16
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] p
);
  localparam int unsigned N = 2 * H;

  logic [N+1:0] t;           // carry-save total of the middle terms
  logic         top_unused;  // always 0: the product fits in 2N bits

  assign p[H-1:0] = q0[H-1:0];

  csa #(.N(N)) u_csa (
    .a(q1),
    .b(q2),
    .c({q3[H-1:0], q0[N-1:H]}),
    .s(t)
  );

  assign p[3*H-1:H] = t[N-1:0];

  rca #(.N(H)) u_top (
    .x   (q3[N-1:H]),
    .y   ({{(H-2){1'b0}}, t[N+1:N]}),
    .cin (1'b0),
    .s   (p[4*H-1:3*H]),
    .cout(top_unused)
  );
endmodule
