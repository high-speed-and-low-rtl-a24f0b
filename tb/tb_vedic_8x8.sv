// tb_vedic_8x8: exhaustive self-check of the 8x8 Vedic multiplier.
// All 65536 operand pairs; p must equal a * b.
module tb_vedic_8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int          checks = 0, failures = 0;

  vedic_8x8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (int'(p) != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
