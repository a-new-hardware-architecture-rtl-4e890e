// fuzzifier - converts one 8-bit crisp input into the fn and msf arrays.
//
// Five membership elements, one per fuzzy set NB, NS, ZE, PS, PB (index 0..4),
// evaluate the input in parallel; their flags (fn) and degrees (msf) are
// registered once. For x = 8'h50, for example, NB and NS are active with
// degrees 8'h1E and 8'hE4. The corners and slopes come from fuzzy_pkg.
//
// Timing: x is sampled on the rising clock edge and the arrays appear one
// cycle later; valid_in is delayed with the data to valid_out. reset is
// synchronous and active high (the source's reset is active high; whether
// it is synchronous is this design's choice) and clears every register.
module fuzzifier
  import fuzzy_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     valid_in,
  input  deg_t     x,
  output logic     valid_out,
  output fn_vec_t  fn,
  output deg_vec_t msf
);

  fn_vec_t  fn_d;
  deg_vec_t msf_d;

  for (genvar i = 0; i < NSETS; i++) begin : g_mf
    membership_element #(
      .A1            (MF_A1[i]),
      .A2            (MF_A2[i]),
      .A3            (MF_A3[i]),
      .SLOPE_UP      (MF_UP[i]),
      .SLOPE_DN      (MF_DN[i]),
      .LEFT_SHOULDER (i == 0),
      .RIGHT_SHOULDER(i == NSETS - 1)
    ) u_mf (
      .x  (x),
      .fn (fn_d[i]),
      .msf(msf_d[i])
    );
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      fn        <= '0;
      msf       <= '0;
      valid_out <= 1'b0;
    end else begin
      fn        <= fn_d;
      msf       <= msf_d;
      valid_out <= valid_in;
    end
  end

endmodule
