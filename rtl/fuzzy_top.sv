// fuzzy_top - two-input fuzzy logic controller (error e, change of error ce).
//
// input1 (e) and input2 (ce) are 8-bit codes of values in [-1, 1]
// (8'h00 = -1, 8'hFF = +1). Each goes through its own fuzzifier (five
// triangular sets), the rule base fires the 25 min-rules and merges them per
// output set with max, and the defuzzifier forms the weighted average of the
// output singletons. The result is a magnitude fuzzy_out (value/255) plus a
// sign bit sig (1 = negative).
//
// Port names and widths follow the source's top level (clock, reset,
// valid_in, input1[7:0], input2[7:0], sig, a 20-bit output); valid_out is
// this design's addition. The datapath is fully pipelined: a new input pair
// may enter every cycle, and its result appears eight clock cycles after the
// edge that samples it (1 fuzzification + 1 firing + 3 combining + 3
// defuzzification), with valid_out high in that cycle. reset is
// synchronous and active high.
module fuzzy_top
  import fuzzy_pkg::*;
#(
  parameter int unsigned OUT_W = 20,
  parameter deg_t        WEIGHT [NSETS] = OUT_WEIGHT   // output singleton weights NB..PB
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             valid_in,
  input  logic [7:0]       input1,
  input  logic [7:0]       input2,
  output logic             sig,
  output logic [OUT_W-1:0] fuzzy_out,
  output logic             valid_out
);

  fn_vec_t  fn1, fn2;
  deg_vec_t msf1, msf2, msf3;
  logic     fz_valid, fz2_valid, rb_valid;

  fuzzifier u_fz1 (
    .clk(clock), .reset, .valid_in, .x(input1),
    .valid_out(fz_valid), .fn(fn1), .msf(msf1)
  );

  fuzzifier u_fz2 (
    .clk(clock), .reset, .valid_in, .x(input2),
    .valid_out(fz2_valid), .fn(fn2), .msf(msf2)
  );

  rule_base u_rb (
    .clk(clock), .reset, .valid_in(fz_valid && fz2_valid),
    .u1(fn1), .mf1(msf1), .u2(fn2), .mf2(msf2),
    .valid_out(rb_valid), .msf3
  );

  defuzzifier #(.OUT_W(OUT_W), .WEIGHT(WEIGHT)) u_df (
    .clk(clock), .reset, .valid_in(rb_valid), .fo(msf3),
    .valid_out, .sign(sig), .out(fuzzy_out)
  );

endmodule
