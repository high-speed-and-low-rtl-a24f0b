// full_adder: one-bit full adder.
//
// Adds a, b and a carry in. Built as two half adders whose carries are ORed,
// the usual structure; the gate-level form is this design's choice, only the
// function is fixed. Purely combinational.
//
// Ports: a, b (addend bits), ci (carry in) -> s (sum), co (carry out).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic s1, c1, c2;

  half_adder u_ha0 (.a(a),  .b(b),  .s(s1), .c(c1));
  half_adder u_ha1 (.a(s1), .b(ci), .s(s),  .c(c2));

  assign co = c1 | c2;
endmodule
