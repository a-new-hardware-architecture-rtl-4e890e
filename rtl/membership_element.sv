// membership_element - one triangular membership function of one input.
//
// Given the 8-bit crisp input x and the corners (A1, A2, A3) of a triangle,
// it raises fn when x lies strictly inside the triangle's support (A1, A3)
// and produces the membership degree msf:
//   A1 < x <= A2 : (x - A1) * SLOPE_UP   (rising edge)
//   A2 < x <  A3 : (A3 - x) * SLOPE_DN   (falling edge)
//   otherwise    : 8'h00
// saturated to 8'hFF. Following the source design, the division
// (x-A1)/(A2-A1) scaled to 0..FF is realised as a product with a constant
// slope, and a multiplexer selects the rising or falling edge according to
// x against A2, then a second multiplexer forces 00H when fn is low.
// LEFT_SHOULDER / RIGHT_SHOULDER turn the outer sets NB and PB into shoulders
// that stay at 8'hFF below / above A2; that the degree at x == A2 is full
// and that it saturates are this design's own reading of the equations.
//
// Purely combinational; the enclosing fuzzifier registers the outputs.
module membership_element
  import fuzzy_pkg::*;
#(
  parameter deg_t        A1             = 8'h2A,
  parameter deg_t        A2             = 8'h55,
  parameter deg_t        A3             = 8'h7F,
  parameter int unsigned SLOPE_UP       = 6,
  parameter int unsigned SLOPE_DN       = 5,
  parameter bit          LEFT_SHOULDER  = 1'b0,
  parameter bit          RIGHT_SHOULDER = 1'b0
) (
  input  deg_t x,
  output logic fn,
  output deg_t msf
);

  logic       above_a1, below_a3, above_a2;
  logic [DW+3:0] rise, fall;   // room for a slope up to 15

  assign above_a1 = LEFT_SHOULDER  ? 1'b1 : (x > A1);
  assign below_a3 = RIGHT_SHOULDER ? 1'b1 : (x < A3);
  assign above_a2 = (x > A2);

  always_comb begin
    rise = LEFT_SHOULDER  ? (DW+4)'(DEG_FULL) : (DW+4)'(x - A1) * (DW+4)'(SLOPE_UP);
    fall = RIGHT_SHOULDER ? (DW+4)'(DEG_FULL) : (DW+4)'(A3 - x) * (DW+4)'(SLOPE_DN);
  end

  assign fn = above_a1 & below_a3;

  always_comb begin
    logic [DW+3:0] edge_val;
    edge_val = above_a2 ? fall : rise;
    if (!fn)                         msf = '0;
    else if (edge_val > (DW+4)'(DEG_FULL)) msf = DEG_FULL;
    else                             msf = edge_val[DW-1:0];
  end

endmodule
