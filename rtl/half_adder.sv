// half_adder: one-bit half adder.
//
// Adds two bits: sum is their exclusive OR, carry their AND. It is the cell
// of the 2x2 Vedic multiplier, which needs two of them. The gate-level form is
// the textbook one; nothing else about the cell is specified by the design.
//
// Interface: a, b in; sum, carry out. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
