// firing_stage - evaluates the 25 rules of the rule table.
//
// Rule (a, b) fires when input 1 lies in set a and input 2 in set b
// (fn1[a] AND fn2[b]); its strength is then min(msf1[a], msf2[b]), otherwise
// 8'h00. The rules are grouped in five parts, one per output set: m[k][i] is
// the i-th rule, in row-major order of the rule table, whose consequent is
// output set k. So m[NB][0] is rule (NB,NB), m[NB][1] rule (NB,NS) and
// m[PB][4] rule (PB,PB), as in the source's firing-stage drawing. Each rule
// strength is registered.
//
// Timing: one cycle from the fn/msf inputs to m; valid_in follows to
// valid_out. Synchronous, active-high reset clears m.
module firing_stage
  import fuzzy_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     valid_in,
  input  fn_vec_t  fn1,
  input  deg_vec_t msf1,
  input  fn_vec_t  fn2,
  input  deg_vec_t msf2,
  output logic     valid_out,
  output deg_vec_t m [NSETS]
);

  deg_vec_t m_d [NSETS];

  for (genvar k = 0; k < NSETS; k++) begin : g_out
    for (genvar i = 0; i < NSETS; i++) begin : g_rule
      localparam logic [5:0] R = rule_of(k, i);
      localparam int unsigned A = int'(R[5:3]);
      localparam int unsigned B = int'(R[2:0]);
      always_comb begin
        if (!(fn1[A] && fn2[B]))    m_d[k][i] = '0;
        else if (msf1[A] > msf2[B]) m_d[k][i] = msf2[B];
        else                        m_d[k][i] = msf1[A];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < NSETS; k++) m[k] <= '0;
      valid_out <= 1'b0;
    end else begin
      m         <= m_d;
      valid_out <= valid_in;
    end
  end

endmodule
