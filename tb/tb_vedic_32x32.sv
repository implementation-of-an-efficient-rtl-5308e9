// tb_vedic_32x32: end-to-end self-check of the 32x32 Vedic multiplier, the
// top of the design, at its default (and only) size.
//
// Stimulus, each compared with the 64-bit integer product of the operands:
//   * the two published example products, 12345678*00ABCDEF and
//     023456FD*00001234, with the expected products written out;
//   * corner operands (0, 1, all ones) and all 32x32 pairs of single bits;
//   * 8x8 and 16x16 products carried out on the 32-bit datapath with
//     zero-extended operands, 50,000 random pairs each;
//   * 300,000 random full-width pairs.
// The product is combinational and is sampled 1 time unit after the
// operands change. The testbench also counts how often the carry paths of
// the structure are used, and fails if one of them never is:
//   * the upper half adder of a 2x2 leaf (3*3 in the low 2-bit digits),
//   * the middle (crosswise) adder carrying out of its N bits into the upper
//     adder, at each of the 4x4, 8x8, 16x16 and 32x32 levels.
// (The middle sum never reaches 2^(N+1): two products below 2^N - 2^(H+1) + 1
// plus a term below 2^H stay under 2^(N+1), so its carry is at most 1.)
module tb_vedic_32x32;
  logic [31:0] x, y;
  logic [63:0] z;
  int checks = 0, failures = 0;
  int leaf_carry = 0, mid_carry4 = 0, mid_carry8 = 0, mid_carry16 = 0, mid_carry32 = 0;

  vedic_32x32 dut (.x(x), .y(y), .z(z));

  task automatic check(input logic [31:0] a, input logic [31:0] b, input logic [63:0] expected);
    x = a;
    y = b;
    #1;
    checks++;
    if (z !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h expected %h", a, b, z, expected);
    end
    // carry paths, observed inside the lowest chain of sub-multipliers
    if (dut.u_mul_ll.u_mul_ll.u_mul_ll.u_mul_ll.s[3])       leaf_carry++;
    if (dut.u_mul_ll.u_mul_ll.u_mul_ll.mid_sum[5:4] != 0)   mid_carry4++;
    if (dut.u_mul_ll.u_mul_ll.mid_sum[9:8] != 0)            mid_carry8++;
    if (dut.u_mul_ll.mid_sum[17:16] != 0)                   mid_carry16++;
    if (dut.mid_sum[33:32] != 0)                            mid_carry32++;
  endtask

  function automatic logic [63:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return longint'(a) * longint'(b);
  endfunction

  task automatic need(input string what, input int count);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b;
    // published examples
    check(32'h12345678, 32'h00ABCDEF, 64'h000C379AAA42D208);
    check(32'h023456FD, 32'h00001234, 64'h0000002820BF7564);
    // corners
    check('0, '1, 64'h0);
    check(32'h1, '1, 64'h00000000FFFFFFFF);
    check('1, '1, 64'hFFFFFFFE00000001);
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        check(32'(1) << i, 32'(1) << j, 64'(1) << (i + j));
    // 8x8 and 16x16 products on the 32-bit datapath
    for (int n = 0; n < 50000; n++) begin
      a = 32'($urandom & 32'hFF);
      b = 32'($urandom & 32'hFF);
      check(a, b, ref_mul(a, b));
      a = 32'($urandom & 32'hFFFF);
      b = 32'($urandom & 32'hFFFF);
      check(a, b, ref_mul(a, b));
    end
    // full width
    for (int n = 0; n < 300000; n++) begin
      a = $urandom;
      b = $urandom;
      check(a, b, ref_mul(a, b));
    end
    need("2x2 upper half adder carries", leaf_carry);
    need("4x4 middle adder carries out", mid_carry4);
    need("8x8 middle adder carries out", mid_carry8);
    need("16x16 middle adder carries out", mid_carry16);
    need("32x32 middle adder carries out", mid_carry32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
