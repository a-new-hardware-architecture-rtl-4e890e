// fuzzy_pkg - types and constants shared by the two-input fuzzy controller.
//
// Every crisp value in the datapath is an 8-bit code: 8'h00 stands for -1 and
// 8'hFF for +1 (real = 2*code/255 - 1). Each input has five triangular fuzzy
// sets NB, NS, ZE, PS, PB; a membership degree is also an 8-bit code with
// 8'hFF meaning full membership.
//
// From the design description: the breakpoints 00/2A/55/7F/AA/DA/FF of the
// five sets, the shoulders of NB and PB, and the 5x5 rule table (Table I in
// the source). This design's own reading: the division (x-a1)/(a2-a1) is done
// as a multiplication by a small integer slope per segment; the slopes below
// (6,5,6,5) are the ones that reproduce the published result vectors. The
// output singleton weights AA/55/00/55/AA likewise reproduce the published
// results (see defuzzifier.sv).
package fuzzy_pkg;

  localparam int unsigned NSETS  = 5;   // fuzzy sets per variable
  localparam int unsigned DW     = 8;   // data / degree width

  typedef logic [DW-1:0] deg_t;             // membership degree / crisp code
  typedef deg_t [NSETS-1:0] deg_vec_t;      // one degree per fuzzy set
  typedef logic [NSETS-1:0] fn_vec_t;       // one "input lies in set" flag per set

  typedef enum logic [2:0] {NB = 3'd0, NS = 3'd1, ZE = 3'd2, PS = 3'd3, PB = 3'd4} fset_e;

  localparam deg_t DEG_FULL = 8'hFF;

  // Triangle corners (a1, a2, a3) of each input set, and the integer slope of
  // the rising (a1..a2) and falling (a2..a3) edge.  NB is flat at full
  // membership for x <= a2, PB for x >= a2.
  localparam deg_t MF_A1 [NSETS] = '{8'h00, 8'h2A, 8'h55, 8'h7F, 8'hAA};
  localparam deg_t MF_A2 [NSETS] = '{8'h2A, 8'h55, 8'h7F, 8'hAA, 8'hDA};
  localparam deg_t MF_A3 [NSETS] = '{8'h55, 8'h7F, 8'hAA, 8'hDA, 8'hFF};
  localparam int unsigned MF_UP [NSETS] = '{0, 6, 5, 6, 5};
  localparam int unsigned MF_DN [NSETS] = '{6, 5, 6, 5, 0};

  // Rule table: output set for (x1 set, x2 set), rows indexed by x1.
  localparam fset_e RULE_TABLE [NSETS][NSETS] = '{
    '{NB, NB, NB, NS, ZE},
    '{NB, NS, NS, ZE, PS},
    '{NB, NS, ZE, PS, PB},
    '{NS, ZE, PS, PS, PB},
    '{ZE, PS, PB, PB, PB}
  };

  // Output singleton magnitudes (value/255), NB..PB. NB/NS count towards the
  // sign-0 sum, ZE/PS/PB towards the sign-1 sum.
  localparam deg_t OUT_WEIGHT [NSETS] = '{8'hAA, 8'h55, 8'h00, 8'h55, 8'hAA};

  // The i-th rule (0..4, in row-major order of the rule table) whose
  // consequent is output set k; returns its (x1 set, x2 set) pair packed as
  // {x1, x2}.  Every output set owns exactly five rules in this table.
  function automatic logic [5:0] rule_of(input int unsigned k, input int unsigned i);
    int unsigned n;
    logic [5:0] r;
    n = 0;
    r = '0;
    for (int unsigned a = 0; a < NSETS; a++)
      for (int unsigned b = 0; b < NSETS; b++)
        if (int'(RULE_TABLE[a][b]) == int'(k)) begin
          if (n == i) r = {3'(a), 3'(b)};
          n++;
        end
    return r;
  endfunction

endpackage
