// vedic_2x2: 2x2-bit Urdhva Tiryagbhyam (vertically and crosswise) multiplier.
//
// The four bit products are formed by AND gates. The vertical product a0b0 is
// bit 0 of the result. The two crosswise products a1b0 and a0b1 go into the
// first half adder, whose sum is bit 1. Its carry and the second vertical
// product a1b1 go into the second half adder, whose sum is bit 2 and whose
// carry is bit 3. This structure is the one the design is built from.
// Purely combinational.
//
// Ports: a, b (2-bit unsigned operands) -> p (4-bit product).
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  assign p[0] = a0b0;

  half_adder u_ha_cross (.a(a1b0), .b(a0b1), .s(p[1]), .c(c1));
  half_adder u_ha_top   (.a(a1b1), .b(c1),   .s(p[2]), .c(p[3]));
endmodule
