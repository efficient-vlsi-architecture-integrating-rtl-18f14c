// vedic_mul16x16: 16-bit Urdhva-Tiryagbhyam square circuit (a general
// 16x16 multiplier; the same value on a and b gives a squared).
// This is the 16-bit case and the top of the design, built from four 8-bit circuits.
// Each operand is split into halves, a = {aH, aL}, b = {bH, bL}. Four
// 8-bit circuits (vedic_mul8x8) form the vertical products aL*bL and aH*bH and
// the crosswise products aH*bL and aL*bH, all at the same time, and
// vedic_combine adds them in place: p = aL*bL + (aH*bL + aL*bH) << 8
// + aH*bH << 16.
// Interface: a, b are 16-bit unsigned operands, p the 32-bit product, as in
// the 16-bit circuit's A, B and P ports. Combinational: no clock, p is
// valid one propagation delay after a and b settle.
// The split into four half-size circuits follows the 2-, 4-, 8- and 16-bit
// hierarchy of the square circuits; the adder arrangement inside
// vedic_combine is this design's choice.
module vedic_mul16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;

  vedic_mul8x8 u_ll (.a(a[7:0]),  .b(b[7:0]),  .p(q0));
  vedic_mul8x8 u_hl (.a(a[15:8]), .b(b[7:0]),  .p(q1));
  vedic_mul8x8 u_lh (.a(a[7:0]),  .b(b[15:8]), .p(q2));
  vedic_mul8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(q3));

  vedic_combine #(.H(8)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3),
    .p(p)
  );
endmodule
