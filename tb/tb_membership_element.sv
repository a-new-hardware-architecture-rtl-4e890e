// tb_membership_element - sweeps all 256 input codes through three
// membership elements (the NB left shoulder, the NS triangle and the PB right
// shoulder) and compares fn and msf with the reference model, plus a few
// hand-worked points: NS(0x50) = 0xE4, NB(0x50) = 0x1E, NS(0x55) saturates
// to 0xFF, PB(0xB0) = 0x1E.
module tb_membership_element;
  import fuzzy_ref_pkg::*;

  logic [7:0] x;
  logic       fn_nb, fn_ns, fn_pb;
  logic [7:0] mu_nb, mu_ns, mu_pb;
  int checks = 0, failures = 0;

  membership_element #(.A1(8'h00), .A2(8'h2A), .A3(8'h55), .SLOPE_UP(0), .SLOPE_DN(6),
                       .LEFT_SHOULDER(1'b1)) u_nb (.x, .fn(fn_nb), .msf(mu_nb));
  membership_element #(.A1(8'h2A), .A2(8'h55), .A3(8'h7F), .SLOPE_UP(6), .SLOPE_DN(5))
                       u_ns (.x, .fn(fn_ns), .msf(mu_ns));
  membership_element #(.A1(8'hAA), .A2(8'hDA), .A3(8'hFF), .SLOPE_UP(5), .SLOPE_DN(0),
                       .RIGHT_SHOULDER(1'b1)) u_pb (.x, .fn(fn_pb), .msf(mu_pb));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%02h got %0h expected %0h", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      check("fn NB", int'(fn_nb), int'(ref_fn(0, v)));
      check("fn NS", int'(fn_ns), int'(ref_fn(1, v)));
      check("fn PB", int'(fn_pb), int'(ref_fn(4, v)));
      check("mu NB", int'(mu_nb), ref_fn(0, v) ? ref_mu(0, v) : 0);
      check("mu NS", int'(mu_ns), ref_fn(1, v) ? ref_mu(1, v) : 0);
      check("mu PB", int'(mu_pb), ref_fn(4, v) ? ref_mu(4, v) : 0);
    end
    x = 8'h50; #1;
    check("NS(50)", int'(mu_ns), 'hE4);
    check("NB(50)", int'(mu_nb), 'h1E);
    x = 8'h55; #1;
    check("NS(55)", int'(mu_ns), 'hFF);
    check("NB(55)", int'(mu_nb), 'h00);
    x = 8'hB0; #1;
    check("PB(B0)", int'(mu_pb), 'h1E);
    x = 8'h10; #1;
    check("NB(10)", int'(mu_nb), 'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
