// tb_vedic_4x4: exhaustive self-check of the 4x4 Vedic multiplier.
// All 256 operand pairs are applied; the 8-bit product is compared with the
// integer product x*y computed in the testbench.
module tb_vedic_4x4;
  logic [3:0] x, y;
  logic [7:0] z;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.x(x), .y(y), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        x = 4'(i);
        y = 4'(j);
        #1;
        checks++;
        if (z !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", i, j, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
