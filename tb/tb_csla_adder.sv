// tb_csla_adder: self-check of the carry select adder.
// The default 4-bit adder (2-bit groups) gets all 512 combinations of a, b and
// ci; 6-bit and 24-bit instances, the widths used in the multiplier, get
// random operands plus all-ones corner cases. {co, s} must equal a + b + ci.
// The testbench works out, from the operands alone, whether each group's
// result had to come from its carry-in-1 copy or its carry-in-0 copy, and
// fails if either choice never occurred.
module tb_csla_adder;
  logic [3:0]  a4, b4, s4;
  logic [5:0]  a6, b6, s6;
  logic [23:0] a24, b24, s24;
  logic        ci4, co4, ci6, co6, ci24, co24;
  int          checks = 0, failures = 0;
  int          sel_one = 0, sel_zero = 0;

  csla_adder dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  csla_adder #(.WIDTH(6))  dut6  (.a(a6),  .b(b6),  .ci(ci6),  .s(s6),  .co(co6));
  csla_adder #(.WIDTH(24)) dut24 (.a(a24), .b(b24), .ci(ci24), .s(s24), .co(co24));

  // Count, for every group above the lowest, whether its carry in was 1.
  function automatic void count_selects(longint unsigned x, longint unsigned y,
                                        bit c, int width);
    for (int k = 2; k < width; k += 2) begin
      longint unsigned m = (64'd1 << k) - 1;
      if ((((x & m) + (y & m) + c) >> k) != 0) sel_one++;
      else sel_zero++;
    end
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a6, b6, ci6, a24, b24, ci24} = '0;
    for (int i = 0; i < 512; i++) begin
      {a4, b4, ci4} = 9'(i);
      #1;
      checks++;
      count_selects(a4, b4, ci4, 4);
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++;
        $display("FAIL4 %h + %h + %0d -> %0d %h", a4, b4, ci4, co4, s4);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      if (i < 4) begin
        a6 = '1; b6 = 6'(i); ci6 = 1'(i);
        a24 = '1; b24 = 24'(i); ci24 = 1'(i);
      end else begin
        a6 = 6'($urandom); b6 = 6'($urandom); ci6 = 1'($urandom);
        a24 = 24'($urandom); b24 = 24'($urandom); ci24 = 1'($urandom);
      end
      #1;
      checks += 2;
      count_selects(a24, b24, ci24, 24);
      if ({co6, s6} !== 7'(int'(a6) + int'(b6) + int'(ci6))) begin
        failures++;
        $display("FAIL6 %h + %h + %0d -> %0d %h", a6, b6, ci6, co6, s6);
      end
      if ({co24, s24} !== 25'(longint'(a24) + longint'(b24) + longint'(ci24))) begin
        failures++;
        $display("FAIL24 %h + %h + %0d -> %0d %h", a24, b24, ci24, co24, s24);
      end
    end
    $display("group results taken from the carry-in-1 copy: %0d, carry-in-0 copy: %0d",
             sel_one, sel_zero);
    checks += 2;
    if (sel_one == 0) failures++;
    if (sel_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
