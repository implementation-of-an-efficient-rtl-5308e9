// half_adder: one-bit adder of two inputs.
//
// The 2x2 Vedic multiplier adds its crosswise bit products, and then the
// carry of that sum with the vertical product of the upper bits, each in a
// two-input "Adder" box. With only two one-bit inputs and no carry in, the
// box is a half adder: sum = a xor b, carry = a and b. The choice of a half
// adder for that box is this design's reading of the block diagram.
//
// Interface: a, b in; sum, carry out. Purely combinational, no clock.
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
