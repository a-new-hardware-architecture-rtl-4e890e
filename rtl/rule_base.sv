// rule_base - fuzzy inference: rule firing followed by rule combining.
//
// The firing stage evaluates all 25 rules of the rule table with AND as
// minimum; the combining stage merges, with OR as maximum, the five rules
// that conclude the same output set. The result msf3[k] is the degree of
// output set k (NB..PB = 0..4).
//
// Ports follow the source's rule-base block: clock, reset, valid_in, the
// flags u1/u2 and degrees mf1/mf2 of the two inputs, and msf3.
// Timing: four cycles (one firing, three combining); valid_out marks msf3.
module rule_base
  import fuzzy_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     valid_in,
  input  fn_vec_t  u1,
  input  deg_vec_t mf1,
  input  fn_vec_t  u2,
  input  deg_vec_t mf2,
  output logic     valid_out,
  output deg_vec_t msf3
);

  deg_vec_t m [NSETS];
  logic     fire_valid;

  firing_stage u_fire (
    .clk, .reset, .valid_in,
    .fn1(u1), .msf1(mf1), .fn2(u2), .msf2(mf2),
    .valid_out(fire_valid), .m(m)
  );

  combining_stage u_comb (
    .clk, .reset, .valid_in(fire_valid), .m(m),
    .valid_out, .msf3
  );

endmodule
