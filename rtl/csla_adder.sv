// csla_adder: WIDTH-bit carry select adder.
//
// The operands are cut into groups of BLOCK bits. The lowest group is a plain
// ripple carry adder fed by ci. Every higher group is added twice at once, by
// one ripple adder with carry in 0 and one with carry in 1; when the carry of
// the group below arrives, multiplexers pick that group's sum and carry out.
// The carry therefore crosses each higher group through one multiplexer
// instead of BLOCK full adders.
//
// With WIDTH = 4 and BLOCK = 2 this is the three-ripple-adder, three-multiplexer
// 4-bit carry select adder the design is based on (bits 1:0 ripple, bits 3:2
// duplicated). Wider adders repeat the duplicated group; that generalisation
// and the per-group carry chain of multiplexers are this design's choices.
// WIDTH must be a multiple of BLOCK. Purely combinational.
//
// Ports: a, b (WIDTH-bit addends), ci (carry in) -> s (WIDTH-bit sum),
// co (carry out).
module csla_adder #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned BLOCK = vedic_pkg::CSLA_BLOCK
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  localparam int unsigned NGROUP = WIDTH / BLOCK;

  if (WIDTH % BLOCK != 0 || WIDTH < BLOCK) begin : g_bad_width
    $error("csla_adder: WIDTH must be a non-zero multiple of BLOCK");
  end

  // c[k] is the carry into group k.
  logic [NGROUP:0] c;

  assign c[0] = ci;

  // Group 0: plain ripple adder on the true carry in.
  rca_adder #(.WIDTH(BLOCK)) u_rca_low (
    .a (a[BLOCK-1:0]),
    .b (b[BLOCK-1:0]),
    .ci(c[0]),
    .s (s[BLOCK-1:0]),
    .co(c[1])
  );

  // Groups 1..NGROUP-1: two speculative ripple adders and a selector.
  for (genvar k = 1; k < NGROUP; k++) begin : g_group
    logic [BLOCK-1:0] sum0, sum1;
    logic             cy0, cy1;

    rca_adder #(.WIDTH(BLOCK)) u_rca_c0 (
      .a (a[k*BLOCK +: BLOCK]),
      .b (b[k*BLOCK +: BLOCK]),
      .ci(1'b0),
      .s (sum0),
      .co(cy0)
    );

    rca_adder #(.WIDTH(BLOCK)) u_rca_c1 (
      .a (a[k*BLOCK +: BLOCK]),
      .b (b[k*BLOCK +: BLOCK]),
      .ci(1'b1),
      .s (sum1),
      .co(cy1)
    );

    mux2 #(.WIDTH(BLOCK)) u_mux_sum (
      .d0 (sum0),
      .d1 (sum1),
      .sel(c[k]),
      .y  (s[k*BLOCK +: BLOCK])
    );

    mux2 #(.WIDTH(1)) u_mux_carry (
      .d0 (cy0),
      .d1 (cy1),
      .sel(c[k]),
      .y  (c[k+1])
    );
  end

  assign co = c[NGROUP];
endmodule
