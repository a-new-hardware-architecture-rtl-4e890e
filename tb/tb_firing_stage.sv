// tb_firing_stage - random flags and degrees for both inputs, one set per
// clock; one cycle later every rule strength m[k][i] must equal
// min(msf1[a], msf2[b]) when fn1[a] and fn2[b] are both set and 0 otherwise,
// where (a, b) is the i-th rule (row-major) concluding output set k in the
// reference rule table. Also checks the rule placement shown in the source
// drawing: m[NB][0] = (NB,NB), m[NB][1] = (NB,NS), m[PB][4] = (PB,PB).
module tb_firing_stage;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  logic     clk = 0, reset = 1, valid_in = 0, valid_out;
  fn_vec_t  fn1 = '0, fn2 = '0;
  deg_vec_t msf1 = '0, msf2 = '0;
  deg_vec_t m [NSETS];
  int checks = 0, failures = 0;
  int ra [5][5], rb [5][5];   // rule (a,b) for output k, position i

  firing_stage dut (.clk, .reset, .valid_in, .fn1, .msf1, .fn2, .msf2, .valid_out, .m);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [5];
    int e;
    for (int k = 0; k < 5; k++) cnt[k] = 0;
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++) begin
        int k;
        k = ref_rule(a, b);
        ra[k][cnt[k]] = a; rb[k][cnt[k]] = b; cnt[k]++;
      end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (cnt[k] != 5) begin failures++; $display("FAIL rule count of set %0d", k); end
    end
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      fn1 = 5'($urandom); fn2 = 5'($urandom); valid_in = 1;
      for (int k = 0; k < 5; k++) begin
        msf1[k] = 8'($urandom);
        msf2[k] = (n % 7 == 0) ? msf1[k] : 8'($urandom);
      end
      @(posedge clk); #1;
      checks++;
      if (valid_out !== 1'b1) begin failures++; $display("FAIL valid"); end
      for (int k = 0; k < 5; k++)
        for (int i = 0; i < 5; i++) begin
          e = (fn1[ra[k][i]] && fn2[rb[k][i]]) ?
              imin(int'(msf1[ra[k][i]]), int'(msf2[rb[k][i]])) : 0;
          checks++;
          if (int'(m[k][i]) != e) begin
            failures++;
            $display("FAIL m[%0d][%0d] got %02h expected %02h", k, i, m[k][i], e);
          end
        end
    end
    // placement of single rules
    @(negedge clk);
    fn1 = 5'b00001; fn2 = 5'b00010; msf1 = '{default: 8'h80}; msf2 = '{default: 8'h40};
    @(posedge clk); #1;
    checks++;
    if (m[0][1] != 8'h40 || m[0][0] != 8'h00) begin failures++; $display("FAIL (NB,NS) placement"); end
    @(negedge clk);
    fn1 = 5'b10000; fn2 = 5'b10000;
    @(posedge clk); #1;
    checks++;
    if (m[4][4] != 8'h40 || m[4][3] != 8'h00) begin failures++; $display("FAIL (PB,PB) placement"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
