// tb_fuzzifier - streams all 256 input codes, one per clock, through the
// fuzzifier and checks fn and msf of every set one cycle later against the
// reference model. Also checks the worked examples 0x50, 0x40, 0x70, 0xB0
// and 0xF0 against their hand-computed degrees, the one-cycle latency of
// valid, and that reset clears the outputs.
module tb_fuzzifier;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  logic     clk = 0, reset = 1, valid_in = 0;
  deg_t     x = '0;
  logic     valid_out;
  fn_vec_t  fn;
  deg_vec_t msf;
  int checks = 0, failures = 0;

  fuzzifier dut (.clk, .reset, .valid_in, .x, .valid_out, .fn, .msf);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected degrees (NB..PB) of the hand-worked examples
  task automatic check_example(input deg_t v, input int e0, input int e1, input int e2,
                               input int e3, input int e4);
    @(negedge clk); x = v; valid_in = 1;
    @(posedge clk); #1;
    check($sformatf("valid %02h", v), int'(valid_out), 1);
    check($sformatf("NB(%02h)", v), int'(msf[0]), e0);
    check($sformatf("NS(%02h)", v), int'(msf[1]), e1);
    check($sformatf("ZE(%02h)", v), int'(msf[2]), e2);
    check($sformatf("PS(%02h)", v), int'(msf[3]), e3);
    check($sformatf("PB(%02h)", v), int'(msf[4]), e4);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check("reset fn", int'(fn), 0);
    check("reset valid", int'(valid_out), 0);
    @(negedge clk); reset = 0;
    // streaming sweep: input v enters at edge n, is checked just after it
    for (int v = 0; v < 256; v++) begin
      @(negedge clk); x = 8'(v); valid_in = 1;
      @(posedge clk); #1;
      check("valid", int'(valid_out), 1);
      for (int k = 0; k < 5; k++) begin
        check($sformatf("fn[%0d] x=%02h", k, v), int'(fn[k]), int'(ref_fn(k, v)));
        check($sformatf("msf[%0d] x=%02h", k, v), int'(msf[k]), ref_fn(k, v) ? ref_mu(k, v) : 0);
      end
    end
    check_example(8'h50, 'h1E, 'hE4, 0, 0, 0);
    check_example(8'h40, 'h7E, 'h84, 0, 0, 0);
    check_example(8'h70, 0, 'h4B, 'h87, 0, 0);
    check_example(8'hB0, 0, 0, 0, 'hD2, 'h1E);
    check_example(8'hF0, 0, 0, 0, 0, 'hFF);
    @(negedge clk); valid_in = 0;
    @(posedge clk); #1;
    check("valid drop", int'(valid_out), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
