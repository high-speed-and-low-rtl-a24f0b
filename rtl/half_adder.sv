// half_adder: one-bit half adder.
//
// The sum is the XOR of the two inputs and the carry is their AND, exactly the
// two gates the half adder is made of. Purely combinational; used in pairs in
// the 2x2 multiplier and twice inside each full adder.
//
// Ports: a, b (addend bits) -> s (sum), c (carry).
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
