// vedic_4x4: 4x4-bit Vedic multiplier built from four 2x2 Vedic multipliers.
//
// Each operand is split into halves of two bits. Four 2x2 multipliers form
// the vertical products a[1:0]*b[1:0] (q0) and a[3:2]*b[3:2] (q3) and the
// crosswise products a[3:2]*b[1:0] (q1) and a[1:0]*b[3:2] (q2), all at once.
// Bits 1:0 of q0 are bits 1:0 of the product. Three carry select adders
// combine the rest: a 4-bit adder forms q1 + q0[3:2], a 6-bit adder forms
// {q3, 2'b00} + q2, and a second 6-bit adder adds the two sums into
// bits 7:2 of the product. This arrangement of one 4-bit and two 6-bit adders
// follows the design; using carry select adders in all three is its
// configuration with the lowest delay. No adder can overflow (q1 + q0[3:2]
// <= 12, {q3,00} + q2 <= 45, and the final sum is the product shifted right by
// 2, <= 56), so the carry outs are left unused.
// Purely combinational: the product is valid one settling delay after a, b.
//
// Ports: a, b (4-bit unsigned operands) -> p (8-bit product).
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  localparam int unsigned N = 4;      // operand width
  localparam int unsigned H = N / 2;   // half width, operand width of the sub-multipliers

  // Partial products of the four sub-multipliers.
  logic [N-1:0] q0, q1, q2, q3;
  // Adder results: q4 = q1 + (q0 >> H), q5 = (q3 << H) + q2, q6 = q5 + q4.
  logic [N-1:0]     q4;
  logic [3*H-1:0]   q5, q6;

  vedic_2x2 u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));  // vertical, low halves
  vedic_2x2 u_mul_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));  // crosswise
  vedic_2x2 u_mul_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));  // crosswise
  vedic_2x2 u_mul_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));  // vertical, high halves

  // N-bit adder: cross product q1 plus the upper half of q0.
  csla_adder #(.WIDTH(N)) u_add_n (
    .a (q1),
    .b ({{H{1'b0}}, q0[N-1:H]}),
    .ci(1'b0),
    .s (q4),
    .co()     // never set, see header
  );

  // First 3N/2-bit adder: q3 shifted up by H plus the other cross product q2.
  csla_adder #(.WIDTH(3*H)) u_add_hi (
    .a ({q3, {H{1'b0}}}),
    .b ({{H{1'b0}}, q2}),
    .ci(1'b0),
    .s (q5),
    .co()     // never set, see header
  );

  // Second 3N/2-bit adder: merges both sums into the upper product bits.
  csla_adder #(.WIDTH(3*H)) u_add_final (
    .a (q5),
    .b ({{H{1'b0}}, q4}),
    .ci(1'b0),
    .s (q6),
    .co()     // never set, see header
  );

  assign p = {q6, q0[H-1:0]};
endmodule
