// combining_element - registered maximum of two membership degrees.
//
// It implements the fuzzy OR: a comparator selects the larger of in1 and in2
// through a multiplexer and a flip-flop holds it. One cycle latency;
// synchronous, active-high reset clears the output. Width follows fuzzy_pkg.
module combining_element
  import fuzzy_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  deg_t in1,
  input  deg_t in2,
  output deg_t out
);

  always_ff @(posedge clk) begin
    if (reset)          out <= '0;
    else if (in2 > in1) out <= in2;
    else                out <= in1;
  end

endmodule
