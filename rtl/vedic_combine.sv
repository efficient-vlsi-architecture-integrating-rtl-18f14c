// vedic_combine: the adder stage that joins four half-size Urdhva products
// into one full-size product, i.e. the "vertically and crosswise" step at
// block level. With a = {aH, aL}, b = {bH, bL}, each H bits wide:
//   q0 = aL*bL (vertical, low)   q1 = aH*bL, q2 = aL*bH (crosswise)
//   q3 = aH*bH (vertical, high)
//   p  = q0 + (q1 + q2) << H + q3 << 2H
// Three ripple adders of 2H bits do this:
//   s1 = q1 + q2                       (carry c1)
//   s2 = s1 + (q0 >> H)                (carry c2)
//   s3 = q3 + {c1 + c2, s2 >> H}       (never overflows)
//   p  = {s3, s2[H-1:0], q0[H-1:0]}
// This is the same column-and-carry order as the decimal example
// 17^2: 7*7 = 49, carry 4; 1*7 + 1*7 + 4 = 18, carry 1; 1*1 + 1 = 2.
// Combinational. H must be at least 2. The adder arrangement is this
// design's choice.
module vedic_combine #(
  parameter int unsigned H = 2
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] p
);
  localparam int unsigned N = 2 * H;

  logic [N-1:0] s1, s2, s3, q0_hi, upper_in;
  logic         c1, c2, c3_unused;

  always_comb begin
    q0_hi        = '0;
    q0_hi[H-1:0] = q0[N-1:H];
  end

  ripple_adder #(.W(N)) u_add_cross (
    .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
  );

  ripple_adder #(.W(N)) u_add_low (
    .a(s1), .b(q0_hi), .cin(1'b0), .sum(s2), .cout(c2)
  );

  // The two carries have weight 2^(N+H) and enter the upper adder at bit H.
  always_comb begin
    upper_in          = '0;
    upper_in[H-1:0]   = s2[N-1:H];
    upper_in[H]       = c1 ^ c2;
    upper_in[H+1]     = c1 & c2;
  end

  ripple_adder #(.W(N)) u_add_high (
    .a(q3), .b(upper_in), .cin(1'b0), .sum(s3), .cout(c3_unused)
  );

  assign p = {s3, s2[H-1:0], q0[H-1:0]};
endmodule
