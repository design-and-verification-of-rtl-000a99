// vedic_4x4: 4x4-bit Vedic multiplier built from four 2x2 multipliers and
// three 4-bit ripple-carry adders.
//
// Each operand is split in halves, a = {ah, al}, b = {bh, bl}. Four 2x2
// multipliers form q0 = al*bl, q1 = ah*bl, q2 = al*bh, q3 = ah*bh, so that
// a*b = q0 + (q1 + q2) * 4 + q3 * 16. The adders then work as follows:
//   adder 1: q1 + q2                          -> s1, carry c1
//   adder 2: s1 + {00, q0[3:2]}               -> s2, carry c2
//   adder 3: q3 + {0, c1 | c2, s2[3:2]}       -> p[7:4]
//   p[1:0] = q0[1:0], p[3:2] = s2[1:0]
// The adder graph is that of the design's 4x4 module. The two carries c1 and
// c2 both carry weight 64 and are merged with an OR gate: they can never
// both be 1 (c1 = 1 needs q1 + q2 >= 16, which leaves s1 <= 2, and then
// s1 + q0[3:2] <= 4 cannot carry), so the OR is an exact sum. Adder 3's own
// carry is always 0 because the product fits in 8 bits; it is left open.
//
// Interface: a, b (4 bits) in; p (8 bits) out, p = a * b. Purely
// combinational; the longest path runs through one 2x2 multiplier and the
// three adders in turn.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] s1, s2;
  logic       c1, c2;
  logic       c3_unused;  // always 0: the product fits in 8 bits

  vedic_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  rca #(.N(4)) u_add1 (
    .x(q1), .y(q2), .cin(1'b0), .s(s1), .cout(c1)
  );

  rca #(.N(4)) u_add2 (
    .x(s1), .y({2'b00, q0[3:2]}), .cin(1'b0), .s(s2), .cout(c2)
  );

  rca #(.N(4)) u_add3 (
    .x(q3), .y({1'b0, c1 | c2, s2[3:2]}), .cin(1'b0), .s(p[7:4]), .cout(c3_unused)
  );

  assign p[1:0] = q0[1:0];
  assign p[3:2] = s2[1:0];
endmodule
