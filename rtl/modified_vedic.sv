// modified_vedic: 32x32-bit modified Vedic multiplier, the top of the design.
//
// An unsigned 32-bit by 32-bit multiplier with a 64-bit product, built as a
// tree of Urdhva Tiryakbhyam ("vertically and crosswise") units:
//   2x2  leaf: AND gates and two half adders
//   4x4  four 2x2 units, three 4-bit ripple-carry adders
//   8x8, 16x16, 32x32  four units of half the width, whose partial products
//        are merged by a carry-save adder and a half-width ripple-carry adder
// At this level the operands are split into 16-bit halves; four 16x16
// multipliers form q0 = al*bl, q1 = ah*bl, q2 = al*bh, q3 = ah*bh in
// parallel, and vedic_merge returns z = q0 + (q1 + q2) << 16 + q3 << 32.
// The port names a, b, z and the widths (32 + 32 inputs, 64 outputs) are the
// design's; the carry-save merge at every level above 4x4 is this design's
// reading of how the modified multiplier uses its carry-save adder.
//
// Interface: a, b (32 bits) in; z (64 bits) out, z = a * b (unsigned).
// Purely combinational, with no clock or reset: the product is valid one
// propagation delay after the operands settle. Register the inputs and the
// output outside if it is used in a clocked datapath.
module modified_vedic (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] z
);
  localparam int unsigned H = 16;

  logic [2*H-1:0] q0, q1, q2, q3;

  vedic_16x16 u_m0 (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q0));
  vedic_16x16 u_m1 (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q1));
  vedic_16x16 u_m2 (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q2));
  vedic_16x16 u_m3 (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q3));

  vedic_merge #(.H(H)) u_merge (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(z)
  );
endmodule
