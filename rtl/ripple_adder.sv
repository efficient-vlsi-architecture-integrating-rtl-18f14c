// ripple_adder: W-bit ripple-carry adder, a chain of W full adders.
// {cout, sum} = a + b + cin. Combinational; the carry ripples from bit 0
// to bit W-1, so its delay grows linearly with W.
// The square circuit only asks for "simple adder circuits"; the ripple
// structure is this design's choice (the simplest one).
module ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
