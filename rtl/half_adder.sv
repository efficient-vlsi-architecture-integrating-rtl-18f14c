// half_adder: one-bit half adder, the basic cell of the square circuits.
// sum = a XOR b, carry = a AND b. Purely combinational, no clock or reset.
// The half adder is the cell the square circuit is drawn with (together
// with AND and OR gates); its gate-level form here is the textbook one.
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
