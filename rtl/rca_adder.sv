// rca_adder: WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full adders; the carry of stage i feeds stage i+1, so the
// carry out settles after the carry has rippled through every stage. With
// ci tied to 0 this is the 4-bit ripple adder whose first stage degenerates
// to a half adder; inside the carry select adder the same module is used with
// a real carry in, or with ci tied to 0 or 1 for the two speculative copies.
// Purely combinational.
//
// Ports: a, b (WIDTH-bit addends), ci (carry in) -> s (WIDTH-bit sum),
// co (carry out).
module rca_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[WIDTH];
endmodule
