// vedic_16x16: 16x16-bit unsigned multiplier, Urdhva Tiryakbhyam structure.
//
// The operands are split into halves, XH/XL and YH/YL of 8 bits, and
//   X*Y = XL*YL + (XL*YH + XH*YL) * 2^8 + XH*YH * 2^16
// Four 8x8 Vedic multipliers form the four products at once (the
// "vertical" products XH*YH and XL*YL and the "crosswise" ones XL*YH and
// XH*YL). The low 8 bits of XL*YL are final at once (Z[7:0]). The
// middle adder circuit adds the two crosswise products and the upper half of
// XL*YL; its low 8 bits are Z[15:8]. The upper adder circuit adds
// XH*YH and the rest of the middle sum (its bits 8 and up, carries included)
// and gives Z[31:16].
// The four 8x8 sub-multipliers, the two 16-bit adder circuits and the slices
// (15-0), (15-8), (7-0), Z7-Z0, Z15-Z8 and Z31-Z16 follow the block diagram of
// the 16x16 multiplier. The output is Z31-Z16 & Z15-Z8 & Z7-Z0.
// Carrying the middle sum's carry bits, not only its bits (15-8), into the
// upper adder is needed for a correct product and is made explicit here.
//
// Interface: x[15:0], y[15:0] in; z[31:0] = x*y out, unsigned.
// Purely combinational: no clock, no reset, no latency in cycles.
//
// The upper adder's two carry bits are always zero for a true product
// (X*Y < 2^32), which an assertion checks: hi_sum[17:16] never leaves the block.
module vedic_16x16 (
  input  logic [15:0] x,
  input  logic [15:0] y,
  output logic [31:0] z
);
  localparam int unsigned N = 16;   // operand width
  localparam int unsigned H = N / 2; // half width

  logic [H-1:0] xh, xl, yh, yl;
  logic [N-1:0] pp_hh, pp_lh, pp_hl, pp_ll;  // partial products (XL*YH = pp_lh)
  logic [N+1:0] mid_sum;                       // middle (crosswise) adder
  logic [N+1:0] hi_sum;                        // upper adder

  assign {xh, xl} = x;
  assign {yh, yl} = y;

  vedic_8x8 u_mul_hh (.x(xh), .y(yh), .z(pp_hh));
  vedic_8x8 u_mul_lh (.x(xl), .y(yh), .z(pp_lh));
  vedic_8x8 u_mul_hl (.x(xh), .y(yl), .z(pp_hl));
  vedic_8x8 u_mul_ll (.x(xl), .y(yl), .z(pp_ll));

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
