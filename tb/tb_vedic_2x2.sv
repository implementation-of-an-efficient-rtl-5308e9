// tb_vedic_2x2: exhaustive self-check of the 2x2 Vedic multiplier.
// All 16 operand pairs are applied and the 4-bit product is compared with
// the integer product a*b. The example 3*3 = 9 exercises the carry of the
// crosswise step into the upper half adder, which is counted.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] s;
  int checks = 0, failures = 0, upper_carries = 0;

  vedic_2x2 dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (s !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d got %0d", i, j, s);
        end
        if (s[3]) upper_carries++;
      end
    end
    checks++;
    if (upper_carries == 0) begin
      failures++;
      $display("FAIL the upper half adder never carried");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
