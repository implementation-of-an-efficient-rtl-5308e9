// vedic_2x2: 2x2-bit multiplier by the "vertically and crosswise" rule.
//
// The leaf of the Vedic multiplier tree. For a = a1a0 and b = b1b0:
//   vertically : s1 = a0b0                      (weight 1)
//   crosswise  : a0b1 + a1b0 -> sum s2, carry c1 (weight 2)
//   vertically : a1b1 + c1   -> sum s3, carry s4 (weight 4, 8)
// Each bit product is an AND of one bit of a and one of b; the two additions
// are half adders. The signal names s1..s4 and c1 and the order of the two
// adders follow the block diagram of the 2x2 multiplier; using AND gates for
// the bit products and half adders for the adders is this design's reading.
//
// Interface: a[1:0], b[1:0] in; s[3:0] = {s4, s3, s2, s1} = a*b out.
// Purely combinational: the product follows the inputs with no clock.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);
  logic a0b0, a0b1, a1b0, a1b1;  // bit products
  logic s1, s2, s3, s4, c1;

  always_comb begin
    a0b0 = a[0] & b[0];
    a0b1 = a[0] & b[1];
    a1b0 = a[1] & b[0];
    a1b1 = a[1] & b[1];
  end

  assign s1 = a0b0;

  // crosswise step
  half_adder u_cross (.a(a0b1), .b(a1b0), .sum(s2), .carry(c1));
  // upper vertical step, absorbing the crosswise carry
  half_adder u_upper (.a(a1b1), .b(c1),   .sum(s3), .carry(s4));

  assign s = {s4, s3, s2, s1};
endmodule
