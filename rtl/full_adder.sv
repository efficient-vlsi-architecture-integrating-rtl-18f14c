// full_adder: one-bit full adder built from two half adders and an OR gate,
// so that every adder in the design uses only the AND, OR and half-adder
// cells of the square circuit's schematic. Combinational.
//   sum  = a ^ b ^ cin
//   cout = (a & b) | ((a ^ b) & cin)
// Building it from half adders is this design's choice; any full adder
// would do.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;

  half_adder u_ha0 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  half_adder u_ha1 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  always_comb cout = c1 | c2;
endmodule
