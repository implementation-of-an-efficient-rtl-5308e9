// vedic_adder_circuit: the binary adder that recombines partial products.
//
// Every NxN Vedic multiplier above 2x2 splits its operands into high and low
// halves, forms four half-size products, and joins them with two of these
// adder circuits:
//   middle (crosswise) stage : XL*YH + XH*YL + (upper half of XL*YL)
//   upper  (vertical)  stage : XH*YH + (upper part of the middle sum)
// so one module with three W-bit operands serves both; the upper stage ties
// its third operand to zero. W is the width of a half-size product, i.e. the
// operand width of the multiplier being built (16 in the 16x16 multiplier,
// 32 in the 32x32 one, as the adder widths are stated for those sizes).
// The sum has W+2 bits, enough for three W-bit operands. How the adder is
// built inside is not specified; it is written as a plain binary addition
// and left to synthesis to map onto the target's carry logic.
//
// Interface: a, b, c [W-1:0] in; sum [W+1:0] = a + b + c out.
// Purely combinational.
module vedic_adder_circuit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W+1:0] sum
);
  always_comb begin
    sum = (W+2)'(a) + (W+2)'(b) + (W+2)'(c);
  end
endmodule
