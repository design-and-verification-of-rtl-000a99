// vedic_16x16: 16x16-bit modified Vedic multiplier.
//
// Urdhva Tiryakbhyam applied one level up: the operands are split into
// 8-bit halves, four 8x8 Vedic multipliers compute the four
// vertical and crosswise partial products in parallel, and vedic_merge adds
// them with a carry-save adder and a half-width ripple-carry adder:
//   q0 = al*bl, q1 = ah*bl, q2 = al*bh, q3 = ah*bh
//   p  = q0 + (q1 + q2) << 8 + q3 << 16
// The recursive construction from smaller Vedic units is the design's; the
// use of the carry-save merge at this level is this design's reading of it.
//
// Interface: a, b (16 bits) in; p (32 bits) out, p = a * b. Purely
// combinational.
module vedic_16x16 (
  input  logic [16-1:0]   a,
  input  logic [16-1:0]   b,
  output logic [2*16-1:0] p
);
  localparam int unsigned H = 8;

  logic [2*H-1:0] q0, q1, q2, q3;

  vedic_8x8 u_m0 (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q0));
  vedic_8x8 u_m1 (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q1));
  vedic_8x8 u_m2 (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q2));
  vedic_8x8 u_m3 (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q3));

  vedic_merge #(.H(H)) u_merge (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
