// full_adder: one-bit full adder.
//
// Adds three bits and returns a two-bit result {cout, sum}: sum is the
// exclusive OR of the three inputs, cout their majority. It is the cell of
// the ripple-carry adder and of the carry-save adder's first row. The
// gate-level form is the textbook one, a choice of this design.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
