// vedic_16x16: 16x16-bit unsigned Vedic multiplier, the top of the design.
//
// Each operand is split into bytes. Four 8x8 Vedic multipliers form the
// vertical products a[7:0]*b[7:0] (q0) and a[15:8]*b[15:8] (q3) and the
// crosswise products a[15:8]*b[7:0] (q1) and a[7:0]*b[15:8] (q2) in parallel;
// each of them is in turn built from four 4x4 and sixteen 2x2 multipliers.
// Bits 7:0 of q0 are bits 7:0 of the product. One 16-bit carry select adder
// forms q1 + q0[15:8], a 24-bit one forms {q3, 8'h00} + q2, and a second
// 24-bit one adds the two sums into bits 31:8 of the product. The pairing of
// the four partial products into two adders and a final adder follows the
// design; carry select adders everywhere are its fastest configuration. None of
// the adders can overflow (the final sum is the product shifted right by 8),
// so the carry outs are left unused.
// Purely combinational, no clock and no registers: p is valid one settling
// delay after a and b change.
//
// Ports: a, b (16-bit unsigned operands) -> p (32-bit product).
module vedic_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  localparam int unsigned N = 16;      // operand width
  localparam int unsigned H = N / 2;   // half width, operand width of the sub-multipliers

  // Partial products of the four sub-multipliers.
  logic [N-1:0] q0, q1, q2, q3;
  // Adder results: q4 = q1 + (q0 >> H), q5 = (q3 << H) + q2, q6 = q5 + q4.
  logic [N-1:0]     q4;
  logic [3*H-1:0]   q5, q6;

  vedic_8x8 u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));  // vertical, low halves
  vedic_8x8 u_mul_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));  // crosswise
  vedic_8x8 u_mul_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));  // crosswise
  vedic_8x8 u_mul_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));  // vertical, high halves

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
