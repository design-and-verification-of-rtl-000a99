// rca: N-bit ripple-carry adder.
//
// A chain of N full adders. Stage i adds x[i], y[i] and the carry out of
// stage i-1 (cin for stage 0); its carry goes on to stage i+1, and the carry
// of the last stage is cout. The structure and the port names X, Y, Cin, S,
// Cout follow the 4-bit ripple-carry adder of the design; the width is a
// parameter here so that the same adder serves every level of the
// multiplier.
//
// Interface: x, y (N bits) and cin in; s (N bits) and cout out, with
// {cout, s} = x + y + cin. Purely combinational; the delay grows linearly
// with N because the carry ripples through every stage.
module rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  // c[i] is the carry into stage i; c[N] leaves the adder.
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    full_adder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
