// tb_fuzzy_top - end-to-end test of the two-input fuzzy controller at its
// default parameters.
//
// 1. The four published verification pairs, each sent alone: the result must
//    appear exactly eight clock cycles after the input is sampled, with the
//    published sign and magnitude (20H/59H -> +AA, A0H/70H -> -17,
//    40H/85H -> +6F, E3H/E0H -> -AA). 20H/09H, the code of the same real
//    input, must give +AA too.
// 2. All 65,536 input pairs, streamed one per clock with a bubble
//    (valid_in low) every 97th cycle, compared with the reference model.
// It counts the mechanisms of the design and fails if one never happened:
// results of either sign, a cancelled (zero) result, shoulder inputs
// (full membership of NB/PB), a saturated triangle edge, an output set fed
// by two or more fired rules, back-to-back inputs and pipeline bubbles.
module tb_fuzzy_top;
  import fuzzy_ref_pkg::*;

  localparam int LAT = 8;
  logic        clock = 0, reset = 1, valid_in = 0;
  logic [7:0]  input1 = '0, input2 = '0;
  logic        sig, valid_out;
  logic [19:0] fuzzy_out;
  int checks = 0, failures = 0;
  int expq [$];
  int n_pos = 0, n_neg = 0, n_zero = 0, n_shoulder = 0, n_sat = 0, n_multi = 0,
      n_b2b = 0, n_bubble = 0;

  fuzzy_top dut (.clock, .reset, .valid_in, .input1, .input2, .sig, .fuzzy_out, .valid_out);

  always #5 clock = ~clock;

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one isolated operation; checks latency, sign and magnitude
  task automatic single(input int x1, input int x2, input int exp_sign, input int exp_mag);
    int cycles;
    @(negedge clock); input1 = 8'(x1); input2 = 8'(x2); valid_in = 1;
    @(posedge clock); #1;
    cycles = 1;   // the sampling edge is the first of the LAT cycles
    @(negedge clock); valid_in = 0; input1 = '0; input2 = '0;
    while (!valid_out && cycles < 20) begin
      @(posedge clock); #1;
      cycles++;
    end
    checks++;
    if (cycles != LAT) begin
      failures++;
      $display("FAIL latency %0d cycles for %02h/%02h", cycles, x1, x2);
    end
    checks++;
    if (int'(sig) != exp_sign || int'(fuzzy_out) != exp_mag) begin
      failures++;
      $display("FAIL %02h/%02h got %0d/%02h expected %0d/%02h", x1, x2, sig, fuzzy_out,
               exp_sign, exp_mag);
    end else
      $display("pair %02h/%02h -> sign %0d value %02h (%0d cycles)", x1, x2, sig, fuzzy_out, cycles);
  endtask

  // mechanisms seen by one input pair
  task automatic count_mechanisms(input int x1, input int x2, input bit s, input int mg);
    int nrules [5];
    if (mg == 0) n_zero++;
    else if (s) n_neg++;
    else n_pos++;
    if (x1 <= 'h2A || x1 >= 'hDA || x2 <= 'h2A || x2 >= 'hDA) n_shoulder++;
    for (int k = 0; k < 5; k++) begin
      if (ref_fn(k, x1) && (k == 1 || k == 3) && (x1 == 'h55 || x1 == 'hAA)) n_sat++;
      nrules[k] = 0;
    end
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++)
        if (ref_fn(a, x1) && ref_fn(b, x2) && ref_mu(a, x1) > 0 && ref_mu(b, x2) > 0)
          nrules[ref_rule(a, b)]++;
    for (int k = 0; k < 5; k++) if (nrules[k] >= 2) begin n_multi++; break; end
  endtask

  // collects streamed results
  initial begin
    forever begin
      @(posedge clock); #2;
      if (valid_out && expq.size() >= 2 && !reset) begin
        int es, em;
        es = expq.pop_front();
        em = expq.pop_front();
        checks++;
        if (int'(sig) != es || int'(fuzzy_out) != em) begin
          failures++;
          if (failures < 20) $display("FAIL stream got %0d/%02h expected %0d/%02h", sig, fuzzy_out, es, em);
        end
      end
    end
  end

  initial begin
    bit s;
    int mg, o[5], p, cyc;
    logic prev_valid;
    repeat (3) @(posedge clock);
    @(negedge clock); reset = 0;
    // published verification pairs
    single('h20, 'h59, 0, 'hAA);
    single('h20, 'h09, 0, 'hAA);
    single('hA0, 'h70, 1, 'h17);
    single('h40, 'h85, 0, 'h6F);
    single('hE3, 'hE0, 1, 'hAA);
    repeat (LAT) @(posedge clock);
    // exhaustive stream
    p = 0; cyc = 0; prev_valid = 0;
    while (p < 65536) begin
      @(negedge clock);
      cyc++;
      if (cyc % 97 == 0) begin
        valid_in = 0;
        n_bubble++;
      end else begin
        valid_in = 1;
        input1 = 8'(p >> 8);
        input2 = 8'(p);
        ref_controller(p >> 8, p & 255, s, mg, o);
        expq.push_back(int'(s));
        expq.push_back(mg);
        count_mechanisms(p >> 8, p & 255, s, mg);
        if (prev_valid) n_b2b++;
        p++;
      end
      prev_valid = valid_in;
    end
    @(negedge clock); valid_in = 0;
    repeat (LAT + 2) @(posedge clock);
    #3;
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size() / 2); end
    $display("mechanisms: positive=%0d negative=%0d zero=%0d shoulder=%0d saturated_edge=%0d",
             n_pos, n_neg, n_zero, n_shoulder, n_sat);
    $display("mechanisms: multi_rule_output=%0d back_to_back=%0d bubbles=%0d", n_multi, n_b2b, n_bubble);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0 || n_shoulder == 0 || n_sat == 0 ||
        n_multi == 0 || n_b2b == 0 || n_bubble == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
