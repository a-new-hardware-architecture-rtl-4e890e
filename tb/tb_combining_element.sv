// tb_combining_element - random operand pairs, one per clock; the output one
// cycle later must be the larger of the two. Includes equal operands and
// reset.
module tb_combining_element;
  import fuzzy_pkg::*;

  logic clk = 0, reset = 1;
  deg_t in1 = '0, in2 = '0, out;
  int checks = 0, failures = 0;

  combining_element dut (.clk, .reset, .in1, .in2, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    @(negedge clk); in1 = 8'h33; in2 = 8'h44;
    @(posedge clk); #1;
    checks++; if (out != 0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); reset = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in1 = 8'($urandom);
      in2 = (n % 10 == 0) ? in1 : 8'($urandom);
      e = (in1 > in2) ? int'(in1) : int'(in2);
      @(posedge clk); #1;
      checks++;
      if (int'(out) != e) begin
        failures++;
        $display("FAIL max(%02h,%02h) got %02h", in1, in2, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
