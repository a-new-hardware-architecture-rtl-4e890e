// tb_rule_base - streams random input flags/degrees (one set per clock)
// through the rule base and compares msf3 four cycles later with the
// reference inference (min for AND, max over rules with the same output).
// Also runs the published example pair 0x70 / 0xF0 whose output degrees are
// PS = 0x4B and PB = 0x87.
module tb_rule_base;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  localparam int LAT = 4;
  logic     clk = 0, reset = 1, valid_in = 0, valid_out;
  fn_vec_t  u1 = '0, u2 = '0;
  deg_vec_t mf1 = '0, mf2 = '0, msf3;
  int checks = 0, failures = 0;
  int expq [$];

  rule_base dut (.clk, .reset, .valid_in, .u1, .mf1, .u2, .mf2, .valid_out, .msf3);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_inputs(input int x1, input int x2, input bit rnd);
    bit f1[5], f2[5];
    int d1[5], d2[5], o[5];
    for (int k = 0; k < 5; k++) begin
      if (rnd) begin
        f1[k] = 1'($urandom); f2[k] = 1'($urandom);
        d1[k] = $urandom_range(0, 255); d2[k] = $urandom_range(0, 255);
      end else begin
        f1[k] = ref_fn(k, x1); d1[k] = f1[k] ? ref_mu(k, x1) : 0;
        f2[k] = ref_fn(k, x2); d2[k] = f2[k] ? ref_mu(k, x2) : 0;
      end
      u1[k] = f1[k]; mf1[k] = 8'(d1[k]);
      u2[k] = f2[k]; mf2[k] = 8'(d2[k]);
    end
    ref_infer(f1, d1, f2, d2, o);
    for (int k = 0; k < 5; k++) expq.push_back(o[k]);
  endtask

  initial begin
    localparam int N = 1000;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      valid_in = (n <= N);
      if (n < N) drive_inputs(0, 0, 1'b1);
      else if (n == N) drive_inputs('h70, 'hF0, 1'b0);
      @(posedge clk); #1;
      if (n >= LAT - 1) begin
        checks++;
        if (valid_out !== 1'b1) begin failures++; $display("FAIL valid at %0d", n); end
        for (int k = 0; k < NSETS; k++) begin
          int e;
          e = expq.pop_front();
          checks++;
          if (int'(msf3[k]) != e) begin
            failures++;
            $display("FAIL set %0d sample %0d got %02h expected %02h", k, n - LAT + 1, msf3[k], e);
          end
        end
        if (n == N + LAT - 1) begin
          checks++;
          if (msf3[3] != 8'h4B || msf3[4] != 8'h87 || msf3[0] != 0 || msf3[1] != 0 || msf3[2] != 0) begin
            failures++;
            $display("FAIL example 70/F0");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
