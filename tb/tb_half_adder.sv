// tb_half_adder: exhaustive self-check of the half adder.
// All four input pairs are applied; sum and carry are compared with the
// two-bit arithmetic sum a + b computed in the testbench.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] expected;
      {a, b} = 2'(i);
      expected = 2'(int'(i[1]) + int'(i[0]));
      #1;
      checks++;
      if ({carry, sum} !== expected) begin
        failures++;
        $display("FAIL a=%b b=%b got carry=%b sum=%b expected %b", a, b, carry, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
