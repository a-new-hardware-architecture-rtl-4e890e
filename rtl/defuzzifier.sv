// defuzzifier - centre-of-gravity (weighted average) of output singletons.
//
// The five output degrees fo[0..4] (NB..PB) are multiplied by singleton
// weights and split into two partial sums, Sm1 = fo[0]*W0 + fo[1]*W1 and
// Sm2 = fo[2]*W2 + fo[3]*W3 + fo[4]*W4, while a third adder forms the sum of
// all degrees. A comparator picks the larger partial sum; the magnitude
// |Sm1 - Sm2| ("product") and the degree sum are registered and divided, and
// a separate sign bit is 1 when Sm2 exceeds Sm1. The crisp output is
// out/255 with that sign.
//
// From the source design: the two partial sums, the comparator with the
// subtractor pair and multiplexer, the registered product and sum, the
// divider, the sign flip-flop and the 20-bit output. This design's own
// choices: the default weights WEIGHT = AA,55,00,55,AA, which reproduce the
// published result vectors (the block drawing prints 2AH for the outer
// weights, which a parameter override of WEIGHT selects); the
// polarity of the sign (the published vectors have sign 0 when NB/NS
// dominate); a register after the partial sums and one after the divider,
// which bring the whole controller to the stated eight cycles; and output 0
// when every degree is 0.
//
// Timing: three cycles from fo to out/sign; valid_in is delayed with them.
// Synchronous, active-high reset. An assertion checks that a valid result
// never exceeds the largest weight.
module defuzzifier
  import fuzzy_pkg::*;
#(
  parameter int unsigned PROD_W = 20,
  parameter int unsigned SUM_W  = 11,
  parameter int unsigned OUT_W  = 20,
  parameter deg_t        WEIGHT [NSETS] = OUT_WEIGHT
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             valid_in,
  input  deg_vec_t         fo,
  output logic             valid_out,
  output logic             sign,
  output logic [OUT_W-1:0] out
);

  logic [PROD_W-1:0] sm1_d, sm2_d, sm1_q, sm2_q;
  logic [SUM_W-1:0]  sum_d, sum_q, sum_q2;
  logic [PROD_W-1:0] product_q;
  logic              sign_q, agb;
  logic [2:0]        valid_q;

  // stage 1: weighted partial sums and the degree sum
  always_comb begin
    sm1_d = '0;
    sm2_d = '0;
    sum_d = '0;
    for (int k = 0; k < NSETS; k++) begin
      if (k < 2) sm1_d += PROD_W'(fo[k]) * PROD_W'(WEIGHT[k]);
      else       sm2_d += PROD_W'(fo[k]) * PROD_W'(WEIGHT[k]);
      sum_d += SUM_W'(fo[k]);
    end
  end

  // stage 2: compare, subtract
  assign agb = (sm1_q > sm2_q);

  always_ff @(posedge clk) begin
    if (reset) begin
      sm1_q     <= '0;
      sm2_q     <= '0;
      sum_q     <= '0;
      product_q <= '0;
      sum_q2    <= '0;
      sign_q    <= 1'b0;
      out       <= '0;
      sign      <= 1'b0;
      valid_q   <= '0;
    end else begin
      // stage 1
      sm1_q <= sm1_d;
      sm2_q <= sm2_d;
      sum_q <= sum_d;
      // stage 2
      product_q <= agb ? (sm1_q - sm2_q) : (sm2_q - sm1_q);
      sum_q2    <= sum_q;
      sign_q    <= !agb && (sm2_q != sm1_q);
      // stage 3: divide
      out  <= (sum_q2 == '0) ? '0 : OUT_W'(product_q / PROD_W'(sum_q2));
      sign <= sign_q;
      valid_q <= {valid_q[1:0], valid_in};
    end
  end

  assign valid_out = valid_q[2];

  // A weighted average can never exceed the largest weight.
  function automatic int unsigned max_weight();
    int unsigned mx = 0;
    for (int k = 0; k < NSETS; k++) if (int'(WEIGHT[k]) > mx) mx = int'(WEIGHT[k]);
    return mx;
  endfunction

  a_out_bounded: assert property (@(posedge clk) disable iff (reset)
    valid_out |-> out <= OUT_W'(max_weight()))
    else $error("defuzzifier result %0h exceeds the largest weight", out);

endmodule
