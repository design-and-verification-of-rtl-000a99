// csa: N-bit carry-save adder of three operands.
//
// The addition is split in two. First a row of N independent full adders
// reduces the three operands bit by bit to a sum vector ps and a carry
// vector pc, with no carry passed between columns. Then an N-bit
// ripple-carry adder adds the carry vector to the sum vector shifted down
// one place, which yields the true total:
//   s[0]      = ps[0]
//   s[N:1]    = {0, ps[N-1:1]} + pc[N-1:0]   (N-bit sum)
//   s[N+1]    = carry out of that adder
// This is the arrangement of the 4-bit carry-save adder the design is built
// on (full adder i takes A_i, B_i, C_i; a constant 0 fills the ripple
// adder's top sum input). N is a parameter here; its default is that 4.
//
// Interface: a, b, c (N bits) in; s (N+2 bits) out, s = a + b + c. Purely
// combinational: one full-adder delay plus an N-stage carry ripple.
module csa #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N+1:0] s
);
  logic [N-1:0] ps;  // column sums of the full-adder row
  logic [N-1:0] pc;  // column carries, weight one place up

  for (genvar i = 0; i < N; i++) begin : g_row
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (ps[i]),
      .cout(pc[i])
    );
  end

  assign s[0] = ps[0];

  rca #(.N(N)) u_merge (
    .x   (pc),
    .y   ({1'b0, ps[N-1:1]}),
    .cin (1'b0),
    .s   (s[N:1]),
    .cout(s[N+1])
  );
endmodule
