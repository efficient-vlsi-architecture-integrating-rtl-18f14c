// vedic_mul2x2: 2-bit Urdhva-Tiryagbhyam ("vertically and crosswise")
// multiplier, the leaf of the square circuits. Feeding the same value on a
// and b gives its square.
//   vertical   : p[0] = a0 b0
//   crosswise  : a1 b0 + a0 b1      -> half adder -> p[1], carry c
//   vertical   : a1 b1 + c          -> half adder -> p[2], p[3]
// Four AND gates and two half adders, as in the 2-bit schematic of the
// square circuit. Combinational: p follows a and b after the gate delay.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic v0, x0, x1, v1;
  logic c_cross;

  always_comb begin
    v0 = a[0] & b[0];
    x0 = a[1] & b[0];
    x1 = a[0] & b[1];
    v1 = a[1] & b[1];
  end

  assign p[0] = v0;

  half_adder u_ha_cross (.a(x0), .b(x1),      .sum(p[1]), .carry(c_cross));
  half_adder u_ha_top   (.a(v1), .b(c_cross), .sum(p[2]), .carry(p[3]));
endmodule
