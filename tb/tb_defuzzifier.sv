// tb_defuzzifier - streams random output-degree vectors (one per clock) and
// checks sign and magnitude three cycles later against the reference
// weighted average. Also checks hand-worked vectors: a lone NB of 0xFF gives
// 0xAA with sign 0, a lone PB gives 0xAA with sign 1, NS=0x3C ZE=0x4B
// PS=0x87 gives 0x17 with sign 1, NB=0x7E NS=0x84 ZE=0x24 gives 0x6F with
// sign 0, and an all-zero vector gives 0. A second instance with the outer
// weights set to 2AH checks the waveform example PS=0x4B PB=0x87: sum 0xD2,
// |Sm1-Sm2| = 0x2F0D, result 0x39 (the default weights give 0x8B there).
module tb_defuzzifier;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  localparam int LAT = 3;
  logic        clk = 0, reset = 1, valid_in = 0, valid_out, sign;
  deg_vec_t    fo = '0;
  logic [19:0] out;
  int checks = 0, failures = 0;
  int expq [$];
  int fixed [6][5] = '{'{255, 0, 0, 0, 0}, '{0, 0, 0, 0, 255}, '{0, 'h3C, 'h4B, 'h87, 0},
                       '{'h7E, 'h84, 'h24, 0, 0}, '{0, 0, 0, 0, 0}, '{0, 0, 'h80, 0, 0}};
  int fixed_exp [6][2] = '{'{0, 'hAA}, '{1, 'hAA}, '{1, 'h17}, '{0, 'h6F}, '{0, 0}, '{0, 0}};

  defuzzifier dut (.clk, .reset, .valid_in, .fo, .valid_out, .sign, .out);

  logic        fig_valid, fig_sign;
  logic [19:0] fig_out;
  defuzzifier #(.WEIGHT('{8'h2A, 8'h55, 8'h00, 8'h55, 8'h2A})) u_fig (
    .clk, .reset, .valid_in, .fo, .valid_out(fig_valid), .sign(fig_sign), .out(fig_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int N = 1000;
    int o[5];
    bit s;
    int mg;
    repeat (2) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int n = 0; n < N + 5 + LAT; n++) begin
      @(negedge clk);
      valid_in = (n < N + 6);
      if (n < N + 6) begin
        for (int k = 0; k < 5; k++) begin
          o[k] = (n < N) ? (($urandom_range(0, 2) == 0) ? 0 : $urandom_range(0, 255))
                         : fixed[n - N][k];
          fo[k] = 8'(o[k]);
        end
        ref_defuzz(o, s, mg);
        if (n >= N) begin
          checks++;
          if (int'(s) != fixed_exp[n - N][0] || mg != fixed_exp[n - N][1]) begin
            failures++;
            $display("FAIL reference disagrees with hand value %0d", n - N);
          end
        end
        expq.push_back(int'(s));
        expq.push_back(mg);
      end
      @(posedge clk); #1;
      if (n >= LAT - 1) begin
        int es, em;
        es = expq.pop_front();
        em = expq.pop_front();
        checks++;
        if (valid_out !== 1'b1 || int'(sign) != es || int'(out) != em) begin
          failures++;
          $display("FAIL sample %0d got %0d/%05h expected %0d/%05h", n - LAT + 1, sign, out, es, em);
        end
      end else begin
        checks++;
        if (valid_out !== 1'b0) begin failures++; $display("FAIL early valid"); end
      end
    end
    @(negedge clk);
    valid_in = 1;
    fo = '{8'h87, 8'h4B, 8'h00, 8'h00, 8'h00};   // fo[4] = PB, fo[3] = PS
    @(negedge clk);
    valid_in = 0;
    repeat (LAT - 1) @(posedge clk);
    #1;
    checks++;
    if (!fig_valid || fig_sign != 1'b1 || fig_out != 20'h00039) begin
      failures++;
      $display("FAIL 2AH weights: got %0d/%05h expected 1/00039", fig_sign, fig_out);
    end
    checks++;
    if (!valid_out || sign != 1'b1 || out != 20'h0008B) begin
      failures++;
      $display("FAIL AAH weights: got %0d/%05h expected 1/0008B", sign, out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
