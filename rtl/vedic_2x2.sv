// vedic_2x2: 2x2-bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf of the multiplier tree.
//
// With a = a1a0 and b = b1b0:
//   vertical   a0*b0           -> p0
//   crosswise  a1*b0 + a0*b1   -> p1, carry into the next column
//   vertical   a1*b1 + carry   -> p2, p3
// Four AND gates form the bit products; one half adder adds the two
// crosswise products, a second adds a1*b1 to the first one's carry. The
// structure follows the design's 2x2 multiplier. It is drawn both with half
// adders and with one-bit full adders whose carry-in is zero, which is the
// same circuit; half adders are used here.
//
// Interface: a, b (2 bits) in; p (4 bits) out, p = a * b. Purely
// combinational, two half-adder delays after the AND gates.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c_cross;  // carry out of the crosswise column

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  assign p[0] = a0b0;

  half_adder u_ha_cross (
    .a    (a1b0),
    .b    (a0b1),
    .sum  (p[1]),
    .carry(c_cross)
  );

  half_adder u_ha_top (
    .a    (a1b1),
    .b    (c_cross),
    .sum  (p[2]),
    .carry(p[3])
  );
endmodule
