// tb_vedic_8x8: self-check of the 8x8 Vedic multiplier.
// First the five published example products (BA*CA, FF*FF, EE*AB, 06*09,
// CD*FE) with their expected values written out, then all 65,536 operand
// pairs against the integer product x*y computed in the testbench.
module tb_vedic_8x8;
  logic [7:0]  x, y;
  logic [15:0] z;
  int checks = 0, failures = 0;

  vedic_8x8 dut (.x(x), .y(y), .z(z));

  task automatic check(input logic [7:0] a, input logic [7:0] b, input logic [15:0] expected);
    x = a;
    y = b;
    #1;
    checks++;
    if (z !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h expected %h", a, b, z, expected);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'hBA, 8'hCA, 16'h92C4);
    check(8'hFF, 8'hFF, 16'hFE01);
    check(8'hEE, 8'hAB, 16'h9EFA);
    check(8'h06, 8'h09, 16'h0036);
    check(8'hCD, 8'hFE, 16'hCB66);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        check(8'(i), 8'(j), 16'(i * j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
