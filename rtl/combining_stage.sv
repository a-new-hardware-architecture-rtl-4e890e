// combining_stage - OR (maximum) of the five rules that share an output set.
//
// For every output set k the five rule strengths m[k][0..4] are reduced to
// one degree msf3[k] by four combining elements in three levels, twenty in
// all:
//   level 1: v(0) = max(m(0), m(1)),  v(1) = max(m(2), m(3))
//   level 2: v(2) = max(v(0), m(4))
//   level 3: v(3) = max(v(1), v(2)) -> msf3[k]
// Each combining element ends in a flip-flop, so the stage takes three
// cycles. The arrangement of the elements is the source design's; the two
// delay registers that keep m(4) and v(1) in step with the other operand of
// their element are this design's addition, so that a new rule set can enter
// every cycle without mixing two input samples.
//
// Synchronous, active-high reset; valid_in is delayed three cycles to
// valid_out.
module combining_stage
  import fuzzy_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     valid_in,
  input  deg_vec_t m [NSETS],
  output logic     valid_out,
  output deg_vec_t msf3
);

  logic [2:0] valid_q;

  for (genvar k = 0; k < NSETS; k++) begin : g_set
    deg_t v0, v1, v2, v3;
    deg_t m4_q, v1_q;

    // level 1
    combining_element u_l1a (.clk, .reset, .in1(m[k][0]), .in2(m[k][1]), .out(v0));
    combining_element u_l1b (.clk, .reset, .in1(m[k][2]), .in2(m[k][3]), .out(v1));
    // level 2
    combining_element u_l2  (.clk, .reset, .in1(v0), .in2(m4_q), .out(v2));
    // level 3
    combining_element u_l3  (.clk, .reset, .in1(v1_q), .in2(v2), .out(v3));

    always_ff @(posedge clk) begin
      if (reset) begin
        m4_q <= '0;
        v1_q <= '0;
      end else begin
        m4_q <= m[k][4];
        v1_q <= v1;
      end
    end

    assign msf3[k] = v3;
  end

  always_ff @(posedge clk) begin
    if (reset) valid_q <= '0;
    else       valid_q <= {valid_q[1:0], valid_in};
  end

  assign valid_out = valid_q[2];

endmodule
