// cordic_addsub: a row of W interconnected processing elements forming a W-bit
// ripple-carry adder/subtractor.
//
// sum = x + y when sub = 0, x - y when sub = 1 (two's complement, modulo 2^W; the
// final carry is dropped). Every bit is one cordic_pe; the carry of bit k feeds C
// of bit k+1 and bit 0 takes C = sub, which supplies the +1 of the two's-complement
// negation. Building the adders from identical PEs follows the design description;
// the ripple-carry chaining is the simplest wiring that does it. Combinational.
module cordic_addsub #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         sub,
  output logic [W-1:0] sum
);

  logic [W:0] carry;

  assign carry[0] = sub;

  for (genvar k = 0; k < W; k++) begin : g_pe
    cordic_pe u_pe (
      .x      (x[k]),
      .y      (y[k]),
      .c      (carry[k]),
      .s      (sub),
      .result (sum[k]),
      .carry  (carry[k+1])
    );
  end

endmodule
