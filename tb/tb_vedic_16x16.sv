// tb_vedic_16x16: self-check of the 16x16 Vedic multiplier.
// The published example products (1111*1111, AB16*9124, 1010*AACC,
// F765*3288), corner operands (0, 1, all ones, single bits), and 200,000
// random pairs are compared with the 64-bit integer product computed in the
// testbench.
module tb_vedic_16x16;
  logic [15:0] x, y;
  logic [31:0] z;
  int checks = 0, failures = 0;

  vedic_16x16 dut (.x(x), .y(y), .z(z));

  task automatic check(input logic [15:0] a, input logic [15:0] b, input logic [31:0] expected);
    x = a;
    y = b;
    #1;
    checks++;
    if (z !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h expected %h", a, b, z, expected);
    end
  endtask

  function automatic logic [31:0] ref_mul(input logic [15:0] a, input logic [15:0] b);
    longint unsigned p;
    p = longint'(a) * longint'(b);
    return p[31:0];
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b;
    check(16'h1111, 16'h1111, 32'h01234321);
    check(16'hAB16, 16'h9124, 32'h60FF8518);
    check(16'h1010, 16'hAACC, 32'h0AB76CC0);
    check(16'hF765, 16'h3288, 32'h30D527A8);
    check(16'hFFFF, 16'hFFFF, 32'hFFFE0001);
    check(16'h0000, 16'hFFFF, 32'h0);
    check(16'h0001, 16'hFFFF, 32'h0000FFFF);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(16'(1) << i, 16'(1) << j, 32'(1) << (i + j));
    for (int n = 0; n < 200000; n++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      check(a, b, ref_mul(a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
