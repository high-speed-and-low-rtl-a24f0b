// mux2: two-way multiplexer of a WIDTH-bit word.
//
// y = sel ? d1 : d0. In the carry select adder sel is the carry from the group
// below, d0 the result computed for carry in 0 and d1 the one for carry in 1.
// Purely combinational.
//
// Ports: d0, d1 (WIDTH bits), sel -> y (WIDTH bits).
module mux2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
