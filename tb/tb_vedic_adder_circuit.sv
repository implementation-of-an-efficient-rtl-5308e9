// tb_vedic_adder_circuit: self-check of the three-operand adder circuit at
// its default width (W = 32). Corner values (all zeros, all ones, which
// produce both carry bits) and 100,000 random triples are compared with the
// sum computed in 64-bit integer arithmetic. Sums that carry into bit W and
// into bit W+1 are counted and must each occur.
module tb_vedic_adder_circuit;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, c;
  logic [W+1:0] sum;
  int checks = 0, failures = 0, carry1 = 0, carry2 = 0;

  vedic_adder_circuit dut (.a(a), .b(b), .c(c), .sum(sum));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic [W-1:0] tc);
    longint unsigned expected;
    a = ta;
    b = tb;
    c = tc;
    expected = longint'(ta) + longint'(tb) + longint'(tc);
    #1;
    checks++;
    if (sum !== (W+2)'(expected)) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%h got %h expected %h", ta, tb, tc, sum, expected);
    end
    if (sum[W+1:W] == 2'b01) carry1++;
    if (sum[W+1:W] == 2'b10) carry2++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, '0);
    check('1, '1, '1);
    check('1, 1, '0);
    check('0, '1, 1);
    for (int n = 0; n < 100000; n++)
      check(W'($urandom), W'($urandom), W'($urandom));
    checks++;
    if (carry1 == 0 || carry2 == 0) begin
      failures++;
      $display("FAIL carry cases not seen: %0d %0d", carry1, carry2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
