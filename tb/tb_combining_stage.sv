// tb_combining_stage - streams a new random set of 25 rule strengths every
// clock; three cycles after each set enters, msf3[k] must be the maximum of
// the five strengths of output set k. Back-to-back streaming shows that the
// three levels stay aligned; the maximum is placed at every one of the five
// positions in turn.
module tb_combining_stage;
  import fuzzy_pkg::*;

  localparam int LAT = 3;
  logic     clk = 0, reset = 1, valid_in = 0, valid_out;
  deg_vec_t m [NSETS];
  deg_vec_t msf3;
  int checks = 0, failures = 0;
  int expq [$];
  int vq [$];

  combining_stage dut (.clk, .reset, .valid_in, .m, .valid_out, .msf3);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_in;
    n_in = 0;
    for (int k = 0; k < NSETS; k++) m[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int n = 0; n < 999 + LAT; n++) begin
      @(negedge clk);
      if (n < 1000) begin
        valid_in = 1;
        for (int k = 0; k < NSETS; k++) begin
          int mx;
          mx = 0;
          for (int i = 0; i < NSETS; i++) m[k][i] = 8'($urandom_range(0, 200));
          m[k][(n + k) % NSETS] = 8'($urandom_range(201, 255));   // maximum position rotates
          for (int i = 0; i < NSETS; i++) if (int'(m[k][i]) > mx) mx = int'(m[k][i]);
          expq.push_back(mx);
        end
      end else valid_in = 0;
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
      end else begin
        checks++;
        if (valid_out !== 1'b0) begin failures++; $display("FAIL early valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
