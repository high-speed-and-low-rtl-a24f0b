// tb_vedic_16x16: end-to-end self-check of the 16x16 Vedic multiplier at its
// only size.
// Applies corner operands (zero, one, all ones, single bits, byte patterns),
// the decimal example 325 * 738 = 239850, and 200000 random pairs; p must
// equal a * b computed in 64-bit integer arithmetic. From the operands alone
// it also works out the values entering the three combining adders
// (q1 + q0[15:8], {q3, 8'h00} + q2, and the sum of those two) and counts how
// often a group of each adder took its carry-in-1 copy, how often a carry
// crossed from the low byte of the product into the high bytes, and how often
// a carry ran through at least eight 2-bit groups of the final adder. Each of
// these must occur at least once.
module tb_vedic_16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int          checks = 0, failures = 0;
  int          sel_one [3];
  int          long_chain = 0, cross_carry = 0;

  vedic_16x16 dut (.a(a), .b(b), .p(p));

  // Number of 2-bit group boundaries whose carry in is 1, and the longest run
  // of consecutive such boundaries, for x + y over width bits.
  function automatic void carries(longint unsigned x, longint unsigned y, int width,
                                  output int ones, output int run);
    int cur = 0;
    ones = 0;
    run  = 0;
    for (int k = 2; k < width; k += 2) begin
      longint unsigned m = (64'd1 << k) - 1;
      if ((((x & m) + (y & m)) >> k) != 0) begin
        ones++;
        cur++;
        if (cur > run) run = cur;
      end else begin
        cur = 0;
      end
    end
  endfunction

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    longint unsigned q0, q1, q2, q3, q4, q5, want;
    int ones, run;
    a = x;
    b = y;
    #1;
    want = longint'(x) * longint'(y);
    q0 = longint'(x[7:0])  * longint'(y[7:0]);
    q1 = longint'(x[15:8]) * longint'(y[7:0]);
    q2 = longint'(x[7:0])  * longint'(y[15:8]);
    q3 = longint'(x[15:8]) * longint'(y[15:8]);
    q4 = q1 + (q0 >> 8);
    q5 = (q3 << 8) + q2;
    carries(q1, q0 >> 8, 16, ones, run);
    if (ones > 0) sel_one[0]++;
    carries(q3 << 8, q2, 24, ones, run);
    if (ones > 0) sel_one[1]++;
    carries(q5, q4, 24, ones, run);
    if (ones > 0) sel_one[2]++;
    if (run >= 8) long_chain++;
    if ((q4 >> 8) != 0 || ((q5 & 64'hff) + (q4 & 64'hff)) > 64'hff) cross_carry++;
    checks++;
    if (longint'(p) != want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d (want %0d)", x, y, p, want);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [8];
    corner = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'h00ff, 16'hff00,
               16'h5555, 16'haaaa};
    sel_one = '{0, 0, 0};

    // Decimal worked example of the vertically-and-crosswise method.
    apply(16'd325, 16'd738);
    checks++;
    if (p != 32'd239850) begin
      failures++;
      $display("FAIL 325 * 738 -> %0d", p);
    end

    foreach (corner[i])
      foreach (corner[j])
        apply(corner[i], corner[j]);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(16'(1) << i, 16'hffff >> j);
    for (int i = 0; i < 200000; i++)
      apply(16'($urandom), 16'($urandom));

    $display("carry-in-1 selections: 16-bit adder %0d, first 24-bit adder %0d, final adder %0d",
             sel_one[0], sel_one[1], sel_one[2]);
    $display("carry into upper product bytes: %0d, carry through >= 8 groups: %0d",
             cross_carry, long_chain);
    foreach (sel_one[k]) begin
      checks++;
      if (sel_one[k] == 0) failures++;
    end
    checks += 2;
    if (cross_carry == 0) failures++;
    if (long_chain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
