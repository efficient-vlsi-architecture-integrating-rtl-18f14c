// vedic_mul8x8: 8-bit Urdhva-Tiryagbhyam square circuit (a general
// 8x8 multiplier; the same value on a and b gives a squared).
// This is the 8-bit case, built from four 4-bit circuits.
// Each operand is split into halves, a = {aH, aL}, b = {bH, bL}. Four
// 4-bit circuits (vedic_mul4x4) form the vertical products aL*bL and aH*bH and
// the crosswise products aH*bL and aL*bH, all at the same time, and
// vedic_combine adds them in place: p = aL*bL + (aH*bL + aL*bH) << 4
// + aH*bH << 8.
// Interface: a, b are 8-bit unsigned operands, p the 16-bit product, as in
// the 8-bit circuit's A, B and P ports. Combinational: no clock, p is
// valid one propagation delay after a and b settle.
// The split into four half-size circuits follows the 2-, 4-, 8- and 16-bit
// hierarchy of the square circuits; the adder arrangement inside
// vedic_combine is this design's choice.
module vedic_mul8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;

  vedic_mul4x4 u_ll (.a(a[3:0]),  .b(b[3:0]),  .p(q0));
  vedic_mul4x4 u_hl (.a(a[7:4]), .b(b[3:0]),  .p(q1));
  vedic_mul4x4 u_lh (.a(a[3:0]),  .b(b[7:4]), .p(q2));
  vedic_mul4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_combine #(.H(4)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3),
    .p(p)
  );
endmodule
