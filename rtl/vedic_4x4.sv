// vedic_4x4: 4x4-bit unsigned multiplier, Urdhva Tiryakbhyam structure.
//
// The operands are split into halves, XH/XL and YH/YL of 2 bits, and
//   X*Y = XL*YL + (XL*YH + XH*YL) * 2^2 + XH*YH * 2^4
// Four 2x2 Vedic multipliers form the four products at once (the
// "vertical" products XH*YH and XL*YL and the "crosswise" ones XL*YH and
// XH*YL). The low 2 bits of XL*YL are final at once (Z[1:0]). The
// middle adder circuit adds the two crosswise products and the upper half of
// XL*YL; its low 2 bits are Z[3:2]. The upper adder circuit adds
// XH*YH and the rest of the middle sum (its bits 2 and up, carries included)
// and gives Z[7:4].
// The 4x4 stage is described only in words: four 2x2 multipliers whose
// partial products are added by adder circuits. It is built here with the same
// structure the larger stages use (four sub-products, a middle and an upper
// adder circuit), which is this design's choice.
// Carrying the middle sum's carry bits, not only its bits (3-2), into the
// upper adder is needed for a correct product and is made explicit here.
//
// Interface: x[3:0], y[3:0] in; z[7:0] = x*y out, unsigned.
// Purely combinational: no clock, no reset, no latency in cycles.
//
// The upper adder's two carry bits are always zero for a true product
// (X*Y < 2^8), which an assertion checks: hi_sum[5:4] never leaves the block.
module vedic_4x4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] z
);
  localparam int unsigned N = 4;   // operand width
  localparam int unsigned H = N / 2; // half width

  logic [H-1:0] xh, xl, yh, yl;
  logic [N-1:0] pp_hh, pp_lh, pp_hl, pp_ll;  // partial products (XL*YH = pp_lh)
  logic [N+1:0] mid_sum;                       // middle (crosswise) adder
  logic [N+1:0] hi_sum;                        // upper adder

  assign {xh, xl} = x;
  assign {yh, yl} = y;

  vedic_2x2 u_mul_hh (.a(xh), .b(yh), .s(pp_hh));
  vedic_2x2 u_mul_lh (.a(xl), .b(yh), .s(pp_lh));
  vedic_2x2 u_mul_hl (.a(xh), .b(yl), .s(pp_hl));
  vedic_2x2 u_mul_ll (.a(xl), .b(yl), .s(pp_ll));

  vedic_adder_circuit #(.W(N)) u_add_mid (
    .a  (pp_lh),
    .b  (pp_hl),
    .c  (N'(pp_ll[N-1:H])),
    .sum(mid_sum)
  );

  vedic_adder_circuit #(.W(N)) u_add_hi (
    .a  (pp_hh),
    .b  (N'(mid_sum[N+1:H])),
    .c  ('0),
    .sum(hi_sum)
  );

  // A carry out of the upper adder would mean a product wider than 2N bits.
  always_comb begin
    assert final (hi_sum[N+1:N] == 2'b00)
      else $error("upper adder carried out: %b", hi_sum[N+1:N]);
  end

  assign z = {hi_sum[N-1:0], mid_sum[H-1:0], pp_ll[H-1:0]};
endmodule
