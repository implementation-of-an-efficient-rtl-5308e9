// vedic_32x32: 32x32-bit unsigned multiplier, Urdhva Tiryakbhyam structure.
//
// The operands are split into halves, XH/XL and YH/YL of 16 bits, and
//   X*Y = XL*YL + (XL*YH + XH*YL) * 2^16 + XH*YH * 2^32
// Four 16x16 Vedic multipliers form the four products at once (the
// "vertical" products XH*YH and XL*YL and the "crosswise" ones XL*YH and
// XH*YL). The low 16 bits of XL*YL are final at once (Z[15:0]). The
// middle adder circuit adds the two crosswise products and the upper half of
// XL*YL; its low 16 bits are Z[31:16]. The upper adder circuit adds
// XH*YH and the rest of the middle sum (its bits 16 and up, carries included)
// and gives Z[63:32].
// This is the largest multiplier of the family and the top of the design.
// The four 16x16 sub-multipliers, the two 32-bit adder circuits and the slices
// (31-0), (31-16), (15-0), Z15-Z0, Z31-Z16 and Z63-Z32 follow the block
// diagram of the 32x32 multiplier. The output is Z63-Z32 & Z31-Z16 & Z15-Z0.
// Carrying the middle sum's carry bits, not only its bits (31-16), into the
// upper adder is needed for a correct product and is made explicit here.
//
// Interface: x[31:0], y[31:0] in; z[63:0] = x*y out, unsigned.
// Purely combinational: no clock, no reset, no latency in cycles.
//
// The upper adder's two carry bits are always zero for a true product
// (X*Y < 2^64), which an assertion checks: hi_sum[33:32] never leaves the block.
module vedic_32x32 (
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [63:0] z
);
  localparam int unsigned N = 32;   // operand width
  localparam int unsigned H = N / 2; // half width

  logic [H-1:0] xh, xl, yh, yl;
  logic [N-1:0] pp_hh, pp_lh, pp_hl, pp_ll;  // partial products (XL*YH = pp_lh)
  logic [N+1:0] mid_sum;                       // middle (crosswise) adder
  logic [N+1:0] hi_sum;                        // upper adder

  assign {xh, xl} = x;
  assign {yh, yl} = y;

  vedic_16x16 u_mul_hh (.x(xh), .y(yh), .z(pp_hh));
  vedic_16x16 u_mul_lh (.x(xl), .y(yh), .z(pp_lh));
  vedic_16x16 u_mul_hl (.x(xh), .y(yl), .z(pp_hl));
  vedic_16x16 u_mul_ll (.x(xl), .y(yl), .z(pp_ll));

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
