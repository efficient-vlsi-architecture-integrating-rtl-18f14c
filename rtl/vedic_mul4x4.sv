// vedic_mul4x4: 4-bit Urdhva-Tiryagbhyam square circuit (a general
// 4x4 multiplier; the same value on a and b gives a squared).
// This is the 4-bit case: the four 2-bit cells are the leaves.
// Each operand is split into halves, a = {aH, aL}, b = {bH, bL}. Four
// 2-bit circuits (vedic_mul2x2) form the vertical products aL*bL and aH*bH and
// the crosswise products aH*bL and aL*bH, all at the same time, and
// vedic_combine adds them in place: p = aL*bL + (aH*bL + aL*bH) << 2
// + aH*bH << 4.
// Interface: a, b are 4-bit unsigned operands, p the 8-bit product, as in
// the 4-bit circuit's A, B and P ports. Combinational: no clock, p is
// valid one propagation delay after a and b settle.
// The split into four half-size circuits follows the 2-, 4-, 8- and 16-bit
// hierarchy of the square circuits; the adder arrangement inside
// vedic_combine is this design's choice.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;

  vedic_mul2x2 u_ll (.a(a[1:0]),  .b(b[1:0]),  .p(q0));
  vedic_mul2x2 u_hl (.a(a[3:2]), .b(b[1:0]),  .p(q1));
  vedic_mul2x2 u_lh (.a(a[1:0]),  .b(b[3:2]), .p(q2));
  vedic_mul2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  vedic_combine #(.H(2)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3),
    .p(p)
  );
endmodule
